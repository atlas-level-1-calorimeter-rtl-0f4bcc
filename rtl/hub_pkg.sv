// hub_pkg: types and constants shared by the Hub FPGA firmware.
//
// The Hub talks to the other modules of an ATCA shelf over two kinds of
// 128-bit "control register" links, each message being four 32-bit words
// sent once per LHC clock:
//   * Readout_Ctrl  : ROD -> Hub, link resets, ROD busy, channel-up flags.
//   * Combined_TTC  : Hub -> each FEX slot, the ROD and the other Hub,
//                     TTC signals (L1A, BCR, ECR, privileged readout),
//                     extended L1ID, link resets, ROD status, shelf number.
// Word_0 bits 7:0 always hold the 8b/10b comma K28.5 (0xBC) and Word_3 bits
// 31:23 a 9-bit CRC.  The field positions below follow the published bit
// tables of both links.  The CRC coverage (bits 8..118), bit order and
// initial value are this design's choice; the polynomial is the specified
// x^9+x^7+x^6+x^5+x^4+x^3+x+1 (0x2FB with the x^9 term, 0x17D in Koopman
// notation).
//
// The IPbus structs follow the usual IPbus SoC bus: the master drives
// strobe/write/addr/wdata, the selected slave answers with rdata/ack/err.
package hub_pkg;

  localparam logic [7:0] K28_5          = 8'hBC;
  localparam logic [8:0] CRC9_POLY      = 9'h0FB;  // x^9 term implied
  localparam int         N_FEX_SLOTS    = 12;      // logical slots 3..14
  localparam int         FIRST_FEX_SLOT = 3;
  localparam int         N_DEST         = N_FEX_SLOTS + 2; // + ROD + other Hub
  localparam logic [3:0] FORMAT_VERSION = 4'h0;

  // Destination codes for the Combined_TTC word builder: 0 = this Hub's ROD,
  // 1 = the other Hub, 3..14 = FEX logical slot.
  localparam int DEST_ROD       = 0;
  localparam int DEST_OTHER_HUB = 1;

  // The four words of one message, index 0 = Word_0 (carries the comma).
  typedef logic [3:0][31:0] msg_words_t;

  // ------------------------------------------------------------------
  // Readout_Ctrl (ROD -> Hub) decoded fields
  // ------------------------------------------------------------------
  typedef struct packed {
    logic [3:0]  version;
    logic        rod_busy;         // word0 bit 14
    logic        aurora_init;      // word0 bit 15, Global_Link_Reset
    logic [11:0] chan_up;          // word0 bits 16..27, index = slot-3
    logic [5:0][3:0] link_rst_4;   // word1 bits 0..23, slots 3..8, M = 0..3
    logic [5:0]  link_rst_1;       // word1 bits 24..29, slots 9..14
  } roc_fields_t;

  // ------------------------------------------------------------------
  // Combined_TTC (Hub -> shelf) fields
  // ------------------------------------------------------------------
  typedef struct packed {
    logic l1a;
    logic bcr;
    logic ecr;
    logic pro;                     // privileged readout
  } ttc_bits_t;

  typedef struct packed {
    logic [3:0]  version;
    logic [3:0]  reset;            // word0 bits 12..15
    ttc_bits_t   ttc;              // word0 bits 16..19
    logic [23:0] l1id;             // word1 bits 0..23
    logic [7:0]  ecrid;            // word1 bits 24..31
    logic [31:0] ctrl_chan;        // word2, reserved, sent as 0
    logic [3:0]  link_reset;       // word3 bits 0..3
    logic        rod_busy;         // word3 bit 4
    logic        link_enable;      // word3 bit 5
    logic        rod0_chan_up;     // word3 bit 6
    logic        rod1_chan_up;     // word3 bit 7
    logic [2:0]  shelf;            // word3 bits 20..22
  } cttc_fields_t;

  function automatic roc_fields_t roc_unpack(input msg_words_t w);
    roc_fields_t f;
    f.version     = w[0][11:8];
    f.rod_busy    = w[0][14];
    f.aurora_init = w[0][15];
    f.chan_up     = w[0][27:16];
    for (int s = 0; s < 6; s++) f.link_rst_4[s] = w[1][4*s +: 4];
    f.link_rst_1  = w[1][29:24];
    return f;
  endfunction

  // Readout_Ctrl words as the ROD builds them (CRC field left zero).
  function automatic msg_words_t roc_pack(input roc_fields_t f);
    msg_words_t w;
    w = '0;
    w[0][7:0]   = K28_5;
    w[0][11:8]  = f.version;
    w[0][14]    = f.rod_busy;
    w[0][15]    = f.aurora_init;
    w[0][27:16] = f.chan_up;
    for (int s = 0; s < 6; s++) w[1][4*s +: 4] = f.link_rst_4[s];
    w[1][29:24] = f.link_rst_1;
    return w;
  endfunction

  // Combined_TTC words (CRC field left zero; the transmitter fills it).
  function automatic msg_words_t cttc_pack(input cttc_fields_t f);
    msg_words_t w;
    w = '0;
    w[0][7:0]   = K28_5;
    w[0][11:8]  = f.version;
    w[0][15:12] = f.reset;
    w[0][16]    = f.ttc.l1a;
    w[0][17]    = f.ttc.bcr;
    w[0][18]    = f.ttc.ecr;
    w[0][19]    = f.ttc.pro;
    w[1][23:0]  = f.l1id;
    w[1][31:24] = f.ecrid;
    w[2]        = f.ctrl_chan;
    w[3][3:0]   = f.link_reset;
    w[3][4]     = f.rod_busy;
    w[3][5]     = f.link_enable;
    w[3][6]     = f.rod0_chan_up;
    w[3][7]     = f.rod1_chan_up;
    w[3][22:20] = f.shelf;
    return w;
  endfunction

  function automatic cttc_fields_t cttc_unpack(input msg_words_t w);
    cttc_fields_t f;
    f.version      = w[0][11:8];
    f.reset        = w[0][15:12];
    f.ttc.l1a      = w[0][16];
    f.ttc.bcr      = w[0][17];
    f.ttc.ecr      = w[0][18];
    f.ttc.pro      = w[0][19];
    f.l1id         = w[1][23:0];
    f.ecrid        = w[1][31:24];
    f.ctrl_chan    = w[2];
    f.link_reset   = w[3][3:0];
    f.rod_busy     = w[3][4];
    f.link_enable  = w[3][5];
    f.rod0_chan_up = w[3][6];
    f.rod1_chan_up = w[3][7];
    f.shelf        = w[3][22:20];
    return f;
  endfunction

  // ------------------------------------------------------------------
  // IPbus SoC bus (A32/D32)
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        strobe;
    logic        write;
    logic [31:0] addr;
    logic [31:0] wdata;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  localparam ipb_rbus_t IPB_RBUS_NULL = '{rdata: 32'h0, ack: 1'b0, err: 1'b0};

  // Register addresses (32-bit word addresses)
  localparam logic [31:0] ADDR_HUB_MODULE  = 32'h0000_0000;
  localparam logic [31:0] ADDR_HUB_ADDRESS = 32'h0000_0001;
  localparam logic [31:0] ADDR_HUB_ALERTS  = 32'h0000_0002;
  localparam logic [31:0] ADDR_HUB_CONTROL = 32'h0000_0003;
  localparam logic [31:0] ADDR_LINK_MON    = 32'h0000_0010; // 0x10..0x1F

  // hub_control register, fields from bit 0 upwards in table order
  typedef struct packed {
    logic [4:0]  spare;
    logic [1:0]  mpod_rst;       // TX and RX MiniPOD resets
    logic [2:0]  sw_loop_det;    // to the switch chips
    logic        rod_pwr_en;     // ROD may turn ON its power supplies
    logic [2:0]  led_drv;        // front panel LEDs
    logic [2:0]  i2c_buf_dis;    // sensor I2C buffer disables
    logic [12:0] mgt_equ;        // MGT fan-out equalisation disables
    logic        fex_clk_dis;    // disable clock to FEXs
    logic        other_hub_clk;  // select clock from other Hub
  } hub_control_t;

  // hub_alerts register, fields from bit 0 upwards in table order
  typedef struct packed {
    logic [15:0] spare;
    logic [2:0]  no_sw_loop_det;
    logic [2:0]  rod_status;     // {spare, ROD not configured, no ROD power}
    logic        rod_smb_alert;
    logic        no_rod;
    logic        hub_pwr_not_ok;
    logic        hub_smb_alert;
    logic [1:0]  mpod_int;
    logic [1:0]  phy_int;
    logic [1:0]  no_pll_lock;
  } hub_alerts_t;

  // Steps of the ROD power-up / link initialisation sequence
  typedef enum logic [2:0] {
    INIT_CONFIG    = 3'd0,  // waiting for configuration / rod_pwr_en
    INIT_ROD_PWR   = 3'd1,  // PWR_CON1 on, waiting for power good
    INIT_ROD_CFG   = 3'd2,  // power good, waiting for ROD ready
    INIT_GT_RESET  = 3'd3,  // Combined_TTC GT reset pulse running
    INIT_LINK_RST  = 3'd4,  // waiting for Readout_Ctrl Aurora_Init to drop
    INIT_AURORA    = 3'd5,  // Aurora channel reset timer running
    INIT_RUN       = 3'd6   // all links released
  } init_step_t;

endpackage
