// Shared types and constants of the IBL readout (BOC, ROD and PRM) RTL.
//
// Holds the IEEE 1149.1 TAP state encoding and the instruction codes used
// by the PRM when it talks to the PLL, the 8b/10b K-word byte values that
// frame front-end data, the record format that travels from the bus
// gatherers to the event fragment builder, and the event-information
// record produced by the trigger processor.
//
// The SAMPLE/PRELOAD (0x1C) and INTEST (0x2C) codes and the all-ones
// BYPASS / all-zeros EXTEST codes follow the text; the IDCODE code, the
// field widths and the frame K-words are choices of this design.
package ibl_pkg;

  // ---------------- JTAG ----------------
  typedef enum logic [3:0] {
    TAP_RESET      = 4'hF,
    TAP_IDLE       = 4'hC,
    TAP_SEL_DR     = 4'h7,
    TAP_CAPTURE_DR = 4'h6,
    TAP_SHIFT_DR   = 4'h2,
    TAP_EXIT1_DR   = 4'h1,
    TAP_PAUSE_DR   = 4'h3,
    TAP_EXIT2_DR   = 4'h0,
    TAP_UPDATE_DR  = 4'h5,
    TAP_SEL_IR     = 4'h4,
    TAP_CAPTURE_IR = 4'hE,
    TAP_SHIFT_IR   = 4'hA,
    TAP_EXIT1_IR   = 4'h9,
    TAP_PAUSE_IR   = 4'hB,
    TAP_EXIT2_IR   = 4'h8,
    TAP_UPDATE_IR  = 4'hD
  } tap_state_e;

  localparam logic [7:0] JI_EXTEST   = 8'h00;
  localparam logic [7:0] JI_SAMPLE   = 8'h1C;
  localparam logic [7:0] JI_INTEST   = 8'h2C;
  localparam logic [7:0] JI_IDCODE   = 8'h16;
  localparam logic [7:0] JI_BYPASS   = 8'hFF;
  localparam logic [7:0] JI_CLAMP    = 8'h20;
  localparam logic [7:0] JI_HIGHZ    = 8'h18;
  localparam logic [7:0] JI_USERCODE = 8'h17;

  // ---------------- 8b/10b K-words used on the links ----------------
  localparam logic [7:0] K_IDLE = 8'h3C;  // K.28.1
  localparam logic [7:0] K_SOF  = 8'hFC;  // K.28.7
  localparam logic [7:0] K_EOF  = 8'hBC;  // K.28.5

  // ---------------- BOC-ROD bus word (one 12-bit bus) ----------------
  typedef struct packed {
    logic       ctrl;   // bit 11: byte is an 8b/10b K-word
    logic       valid;  // bit 10
    logic [1:0] addr;   // bits 9:8: channel within the bus
    logic [7:0] data;   // bits 7:0
  } bus_word_t;

  // ---------------- gatherer record (28 bits) ----------------
  typedef enum logic [1:0] {REC_NONE = 2'd0, REC_HIT = 2'd1, REC_EOF = 2'd2} rec_type_e;

  // one FE-I4 data record: pixel pair at (col, row) and (col, row+1)
  typedef struct packed {
    logic [6:0] col;
    logic [8:0] row;
    logic [3:0] tot;
    logic [3:0] tot2;
  } hit_t;

  typedef struct packed {
    rec_type_e  rtype;  // 27:26
    logic [1:0] ch;     // 25:24
    hit_t       hit;    // 23:0
  } rec_t;

  // ---------------- event information ----------------
  typedef struct packed {
    logic [23:0] l1id;
    logic [11:0] bcid;
    logic [7:0]  ttype;
  } evt_t;

  localparam logic [31:0] ROD_HDR_MARKER = 32'hEE12_34EE;
  localparam logic [7:0]  ROD_TRL_MARKER = 8'hE0;

  // ---------------- BOC-ROD backplane lines ----------------
  // The 8 buses travel on 96 lines, RXDATA[95:0]. Buses 0-3 come from the
  // south main FPGA of the BOC, buses 4-7 from the north one, which uses
  // the same pattern shifted by 48 lines. Within each half:
  //   bus   data      address  valid  control
  //    0    7:0       9:8      10     11
  //    1    35:28     37:36    38     39
  //    2    19:12     41:40    43     42
  //    3    27:20     45:44    47     46
  localparam int unsigned N_BOC_ROD_LINES = 96;

  function automatic int unsigned line_data_lsb(input int unsigned b);
    int unsigned base [4] = '{0, 28, 12, 20};
    return base[b % 4] + 48 * (b / 4);
  endfunction
  function automatic int unsigned line_addr_lsb(input int unsigned b);
    int unsigned base [4] = '{8, 36, 40, 44};
    return base[b % 4] + 48 * (b / 4);
  endfunction
  function automatic int unsigned line_valid(input int unsigned b);
    int unsigned base [4] = '{10, 38, 43, 47};
    return base[b % 4] + 48 * (b / 4);
  endfunction
  function automatic int unsigned line_ctrl(input int unsigned b);
    int unsigned base [4] = '{11, 39, 42, 46};
    return base[b % 4] + 48 * (b / 4);
  endfunction

endpackage
