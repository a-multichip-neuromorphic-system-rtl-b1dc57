// ifat_pkg: widths, address layouts and record types shared by the IFAT
// (integrate-and-fire array transceiver) event router and its neighbours.
//
// Address spaces.
//  * Retina (octopus retina, 80 x 60 pixels): 13-bit {row[5:0], col[6:0]}.
//  * Cortex: two chips of 2400 neurons; each chip is organised here as 40 rows
//    of 60 neurons, addressed {chip, row[5:0], col[5:0]} (13 bits). The 40 x 60
//    shape is this design's choice: a 60-neuron row matches the "more than 360
//    operations per spike" quoted for a row broadcast at six operations each.
//  * Lookup-table index: 14-bit presynaptic index {space, addr[12:0]}, space 0
//    for external (retina/CPU) events and 1 for cortex output events. With an
//    8-bit offset counter this gives the 2^22 = 4,194,304 RAM lines.
//
// RAM line (one synapse), most significant field first, widths as printed in
// the example table of the lookup memory: target 16 bits, weight 4, number of
// events 4, probability 4, equilibrium potential 8 = 36 bits.
//
// Target word encoding (this design's choice; only the stop code 0xFFFF is
// fixed):
//   [15:14]=00 single cortex neuron: [12] chip, [11:6] row, [5:0] col
//   [15:14]=01 external event: [12:0] address sent on the external AER bus
//   [15:14]=10 broadcast: [13:12] 00 one row of one chip ([6] chip, [5:0] row),
//                                01 whole chip ([6] chip), 1x both chips
//   0xFFFF     stop code: end of the synapse list; other 11 codes are skipped
// Lint note: some constants (RAM widths, STOP_CODE, CX_CELL_W, CX_CMD_W)
// document the formats for users and testbenches; a module that does not
// use them leaves them unread.
package ifat_pkg;

  localparam int ADDR_W     = 13;             // retina / cortex / external address
  localparam int INDEX_W    = ADDR_W + 1;     // presynaptic lookup index
  localparam int OFFSET_W   = 8;              // offset counter (0x00..0xFF)
  localparam int RAM_ADDR_W = INDEX_W + OFFSET_W; // 22 -> 4,194,304 lines
  localparam int TARGET_W   = 16;
  localparam int WEIGHT_W   = 4;
  localparam int NEV_W      = 4;
  localparam int PROB_W     = 4;
  localparam int EREV_W     = 8;               // DAC code width
  localparam int RAM_DATA_W = TARGET_W + WEIGHT_W + NEV_W + PROB_W + EREV_W; // 36

  localparam int CX_ROW_W   = 6;
  localparam int CX_COL_W   = 6;
  localparam int CX_CELL_W  = CX_ROW_W + CX_COL_W;  // address within one chip

  localparam logic [TARGET_W-1:0] STOP_CODE = 16'hFFFF;

  typedef struct packed {
    logic [TARGET_W-1:0] target;   // column c: postsynaptic target
    logic [WEIGHT_W-1:0] weight;   // column d: size of the postsynaptic response
    logic [NEV_W-1:0]    nev;      // column e: events per presynaptic event
    logic [PROB_W-1:0]   prob;     // column f: probability code
    logic [EREV_W-1:0]   erev;     // column g: equilibrium potential (DAC code)
  } ram_word_t;

  typedef enum logic [1:0] {
    TK_CORTEX    = 2'b00,
    TK_EXTERNAL  = 2'b01,
    TK_BROADCAST = 2'b10,
    TK_RESERVED  = 2'b11
  } target_kind_e;

  // Selection mode of a command on the internal (cortex) AER bus.
  typedef enum logic [1:0] {
    SEL_CELL = 2'b00,
    SEL_ROW  = 2'b01,
    SEL_CHIP = 2'b10,
    SEL_ALL  = 2'b11
  } cx_sel_e;

  typedef struct packed {
    cx_sel_e             sel;
    logic                chip;
    logic [CX_ROW_W-1:0] row;
    logic [CX_COL_W-1:0] col;
    logic [WEIGHT_W-1:0] weight;
  } cx_cmd_t;                      // 19 bits

  localparam int CX_CMD_W = $bits(cx_cmd_t);

  // Decode a target word into a cortex command (meaningful for TK_CORTEX and
  // TK_BROADCAST targets).
  function automatic cx_cmd_t target_to_cmd(logic [TARGET_W-1:0] t,
                                            logic [WEIGHT_W-1:0] w);
    cx_cmd_t c;
    c.weight = w;
    c.chip   = t[12];
    c.row    = t[11:6];
    c.col    = t[5:0];
    c.sel    = SEL_CELL;
    if (t[15:14] == TK_BROADCAST) begin
      c.chip = t[6];
      c.row  = t[5:0];
      c.col  = '0;
      unique case (t[13:12])
        2'b00:   c.sel = SEL_ROW;
        2'b01:   c.sel = SEL_CHIP;
        default: c.sel = SEL_ALL;
      endcase
    end
    return c;
  endfunction

endpackage
