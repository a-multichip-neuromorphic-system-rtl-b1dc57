// lut_router: the synapse-table walker at the heart of the IFAT FPGA.
//
// For each presynaptic event (a 14-bit lookup index) it reads RAM lines
// {index, offset} with offset = 0, 1, 2, ... until it reads the stop code
// (target 0xFFFF) or has read line 0xFF. Every other line is one synaptic
// connection: target, weight, number of events N, probability code p and
// equilibrium potential E. For such a line the router makes N attempts; each
// attempt passes when the low PROB_W bits of an LFSR are <= p, so p = 0xF
// always passes and p = 0 passes one time in sixteen. A passing attempt to a
// cortex or broadcast target first sets the DAC to E (and waits DAC_SETTLE
// cycles) unless the DAC already holds E, then issues the cortex command; a
// passing attempt to an external target issues an event on the external bus.
// Reserved target words other than the stop code are skipped.
//
// RAM interface: `ram_re` is a one-cycle read strobe with `ram_addr`; the RAM
// answers with `ram_rvalid` and `ram_rdata` any number of cycles later.
// Timing: 3 cycles of overhead per line plus the RAM latency, then 1 cycle per
// attempt plus the output handshake and any DAC settling.
// From the document: base index plus offset counter, stop code, fields and
// their meaning. This design's choices: the probability comparison, N = 0
// meaning no event, the 0xFF end of list, reuse of an already-set DAC value,
// and the encoding of the target word (see ifat_pkg).
// Lint notes: rst_n also disables the assertions during reset (reported as
// a net used synchronously and asynchronously); the event count is taken
// from the RAM word as it arrives, so the held copy's nev field (bits 15:12)
// is unread; only the low 4 bits of the LFSR are used for the draw.
module lut_router
  import ifat_pkg::*;
#(
  parameter int DAC_SETTLE = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // presynaptic events
  input  logic                  ev_valid,
  input  logic [INDEX_W-1:0]    ev_index,
  output logic                  ev_ready,
  // lookup-table RAM
  output logic                  ram_re,
  output logic [RAM_ADDR_W-1:0] ram_addr,
  input  logic                  ram_rvalid,
  input  logic [RAM_DATA_W-1:0] ram_rdata,
  // DAC (equilibrium potential)
  output logic [EREV_W-1:0]     dac_code,
  output logic                  dac_wr,
  // commands to the silicon cortex
  output logic                  cx_valid,
  output cx_cmd_t               cx_cmd,
  input  logic                  cx_ready,
  // events to the external AER bus
  output logic                  ext_valid,
  output logic [ADDR_W-1:0]     ext_addr,
  input  logic                  ext_ready,
  // one-cycle event flags (for monitoring)
  output logic                  st_line,     // a synapse line was read
  output logic                  st_stop,     // the stop code ended a list
  output logic                  st_full,     // a list ended at offset 0xFF
  output logic                  st_drop,     // an attempt failed the probability test
  output logic                  st_settle    // the DAC was rewritten
);
  typedef enum logic [2:0] {R_IDLE, R_READ, R_WAIT, R_DRAW, R_SETTLE, R_SEND, R_NEXT} r_state_e;
  r_state_e              state;
  logic [INDEX_W-1:0]    base;
  logic [OFFSET_W-1:0]   offset;
  ram_word_t             line;
  logic [NEV_W-1:0]      left;
  logic                  dac_loaded;
  logic [$clog2(DAC_SETTLE+1)-1:0] settle_cnt;
  logic [15:0]           rnd;
  logic                  rnd_step;
  ram_word_t             rd_word;
  logic                  to_ext;

  lfsr16 u_lfsr (.clk, .rst_n, .step(rnd_step), .rnd);

  assign rd_word  = ram_word_t'(ram_rdata);
  assign to_ext   = (line.target[15:14] == TK_EXTERNAL);
  assign ev_ready = (state == R_IDLE);
  assign ram_addr = {base, offset};
  assign ram_re   = (state == R_READ);
  assign rnd_step = (state == R_DRAW);
  assign cx_valid = (state == R_SEND) && !to_ext;
  assign ext_valid = (state == R_SEND) && to_ext;
  assign cx_cmd   = target_to_cmd(line.target, line.weight);
  assign ext_addr = line.target[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_IDLE;
      base       <= '0;
      offset     <= '0;
      line       <= '0;
      left       <= '0;
      dac_code   <= '0;
      dac_wr     <= 1'b0;
      dac_loaded <= 1'b0;
      settle_cnt <= '0;
      st_line    <= 1'b0;
      st_stop    <= 1'b0;
      st_full    <= 1'b0;
      st_drop    <= 1'b0;
      st_settle  <= 1'b0;
    end else begin
      dac_wr    <= 1'b0;
      st_line   <= 1'b0;
      st_stop   <= 1'b0;
      st_full   <= 1'b0;
      st_drop   <= 1'b0;
      st_settle <= 1'b0;
      unique case (state)
        R_IDLE: if (ev_valid) begin
          base   <= ev_index;
          offset <= '0;
          state  <= R_READ;
        end
        R_READ: state <= R_WAIT;
        R_WAIT: if (ram_rvalid) begin
          line <= rd_word;
          left <= rd_word.nev;
          if (rd_word.target == STOP_CODE) begin
            st_stop <= 1'b1;
            state   <= R_IDLE;
          end else begin
            st_line <= 1'b1;
            if (rd_word.target[15:14] == TK_RESERVED || rd_word.nev == '0)
              state <= R_NEXT;
            else
              state <= R_DRAW;
          end
        end
        R_DRAW: begin
          if (rnd[PROB_W-1:0] <= line.prob) begin
            if (!to_ext && !(dac_loaded && dac_code == line.erev)) begin
              dac_code   <= line.erev;
              dac_wr     <= 1'b1;
              dac_loaded <= 1'b1;
              settle_cnt <= ($clog2(DAC_SETTLE+1))'(DAC_SETTLE);
              st_settle  <= 1'b1;
              state      <= R_SETTLE;
            end else begin
              state <= R_SEND;
            end
          end else begin
            st_drop <= 1'b1;
            left    <= left - 1'b1;
            state   <= (left == 1) ? R_NEXT : R_DRAW;
          end
        end
        R_SETTLE: begin
          if (settle_cnt <= 1) state <= R_SEND;
          else                 settle_cnt <= settle_cnt - 1'b1;
        end
        R_SEND: if ((to_ext && ext_ready) || (!to_ext && cx_ready)) begin
          left  <= left - 1'b1;
          state <= (left == 1) ? R_NEXT : R_DRAW;
        end
        R_NEXT: begin
          if (offset == '1) begin
            st_full <= 1'b1;
            state   <= R_IDLE;
          end else begin
            offset <= offset + 1'b1;
            state  <= R_READ;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  // A list walk never starts from an unread line: the RAM must answer a read.
  a_ram_answer: assert property (@(posedge clk) disable iff (!rst_n)
    ram_rvalid |-> state == R_WAIT);
  // An offered command or event stays stable until it is taken.
  a_cx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cx_valid && !cx_ready |=> cx_valid && $stable(cx_cmd));
endmodule
