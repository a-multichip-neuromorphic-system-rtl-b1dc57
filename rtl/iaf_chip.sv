// iaf_chip: behavioural model of one silicon-cortex chip, an array of
// random-access integrate-and-fire neurons with a conductance-like synapse.
// This is a model of an analog (switched-capacitor) chip, not logic to be
// synthesised; `clk` is only the model's time base.
//
// Input: commands arrive on a four-phase AER bus (`in_req`/`in_ack`, command
// word `in_cmd`). A command for this chip (`chip` == CHIP_ID, or SEL_ALL)
// selects one neuron, one row, or the whole chip, and each selected neuron
// moves its membrane potential V towards the equilibrium potential E present
// on `erev_mv` (from the DAC) by a fraction set by the 4-bit weight w:
//     V <- V + (w * (E - V)) / 2^GAIN_SHIFT          (values in millivolts)
// A neuron whose V reaches VTH_MV fires: V is reset to VRESET_MV and its
// address is queued. Excitatory synapses use E above the resting range,
// inhibitory ones E below it; a broadcast with E = 0 acts as a global leak.
// Output: queued spikes are sent in firing order on a second four-phase AER
// bus (`out_req`/`out_ack`, address {row, col}); a spike that finds the queue
// full is lost.
// Timing: the model keeps the membrane potentials in a memory and visits the
// selected neurons one per clock cycle (1 cycle for a cell, COLS for a row,
// ROWS*COLS for the chip) before it acknowledges; the real chip updates them
// in parallel. After reset it spends ROWS*COLS cycles clearing the memory.
// From the document: 2400 identical neurons per chip, integrate-and-fire with
// a conductance-like synapse whose weight and equilibrium potential change per
// event, AER input and output, row and whole-chip activation. This model's
// choices: the 40 x 60 organisation, the discrete update rule, threshold and
// reset values, the sequential visit and the output queue.
module iaf_chip
  import ifat_pkg::*;
#(
  parameter logic CHIP_ID    = 1'b0,
  parameter int   ROWS       = 40,
  parameter int   COLS       = 60,
  parameter int   VTH_MV     = 500,
  parameter int   VRESET_MV  = 0,
  parameter int   GAIN_SHIFT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_req,
  input  cx_cmd_t              in_cmd,
  output logic                 in_ack,
  input  logic [15:0]          erev_mv,
  output logic                 out_req,
  output logic [CX_CELL_W-1:0] out_addr,
  input  logic                 out_ack
);
  localparam int N  = ROWS * COLS;
  localparam int IW = $clog2(N);
  localparam int QW = $clog2(N) + 1;          // spike queue holds 2^QW >= N

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_UPD, S_ACK} s_e;
  s_e                  state;
  logic signed [17:0]  vmem [N];
  logic [CX_CELL_W-1:0] queue [2**QW];
  logic [QW:0]         wr_ptr, rd_ptr;
  logic [IW-1:0]       idx;
  logic [IW:0]         left;
  logic [CX_ROW_W-1:0] row;
  logic [CX_COL_W-1:0] col;
  logic [WEIGHT_W-1:0] w;
  logic signed [17:0]  e, v, d, vn;
  logic [1:0]          in_req_sync, out_ack_sync;
  logic                for_me, q_full, q_empty, fire;

  assign for_me  = (in_cmd.sel == SEL_ALL) || (in_cmd.chip == CHIP_ID);
  assign q_full  = (wr_ptr - rd_ptr) == (QW+1)'(2**QW);
  assign q_empty = (wr_ptr == rd_ptr);

  // update datapath for the neuron being visited
  assign v    = vmem[idx];
  assign d    = 18'((e - v) * $signed({1'b0, w}));
  assign vn   = v + (d >>> GAIN_SHIFT);
  assign fire = (vn >= 18'(VTH_MV));

  always_ff @(posedge clk) begin
    if (state == S_INIT)
      vmem[idx] <= 18'(VRESET_MV);
    else if (state == S_UPD && left != 0)
      vmem[idx] <= fire ? 18'(VRESET_MV) : vn;
    if (state == S_UPD && left != 0 && fire && !q_full)
      queue[wr_ptr[QW-1:0]] <= {row, col};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      idx          <= '0;
      left         <= '0;
      row          <= '0;
      col          <= '0;
      w            <= '0;
      e            <= '0;
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      in_req_sync  <= '0;
      out_ack_sync <= '0;
      in_ack       <= 1'b0;
      out_req      <= 1'b0;
      out_addr     <= '0;
    end else begin
      in_req_sync  <= {in_req_sync[0], in_req};
      out_ack_sync <= {out_ack_sync[0], out_ack};

      unique case (state)
        S_INIT: begin
          idx <= idx + 1'b1;
          if (int'(idx) == N - 1) begin
            idx   <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: if (in_req_sync[1] && for_me) begin
          w <= in_cmd.weight;
          e <= $signed({2'b00, erev_mv});
          unique case (in_cmd.sel)
            SEL_CELL: begin
              idx  <= IW'(int'(in_cmd.row) * COLS + int'(in_cmd.col));
              row  <= in_cmd.row;
              col  <= in_cmd.col;
              left <= (int'(in_cmd.row) < ROWS && int'(in_cmd.col) < COLS) ? 1 : 0;
            end
            SEL_ROW: begin
              idx  <= IW'(int'(in_cmd.row) * COLS);
              row  <= in_cmd.row;
              col  <= '0;
              left <= (int'(in_cmd.row) < ROWS) ? (IW+1)'(COLS) : 0;
            end
            default: begin
              idx  <= '0;
              row  <= '0;
              col  <= '0;
              left <= (IW+1)'(N);
            end
          endcase
          state <= S_UPD;
        end
        S_UPD: begin
          if (left == 0 || left == 1) begin
            in_ack <= 1'b1;
            state  <= S_ACK;
          end else begin
            left <= left - 1'b1;
            idx  <= idx + 1'b1;
            if (int'(col) == COLS - 1) begin
              col <= '0;
              row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end
          if (left != 0 && fire && !q_full) wr_ptr <= wr_ptr + 1'b1;
        end
        S_ACK: if (!in_req_sync[1]) begin
          in_ack <= 1'b0;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // output side
      if (!out_req && !out_ack_sync[1]) begin
        if (!q_empty) begin
          out_addr <= queue[rd_ptr[QW-1:0]];
          rd_ptr   <= rd_ptr + 1'b1;
          out_req  <= 1'b1;
        end
      end else if (out_req && out_ack_sync[1]) begin
        out_req <= 1'b0;
      end
    end
  end
endmodule
