// scan_stream_decoder: turns the mode-tagged test data stream arriving on the
// single scan-input pin into the per-clock operation of the scan chains.
//
// Stream format, one bit per clock on tdi while scan_en = 1. Every record
// starts with a configuration selection bit:
//   0, b                   parallel record: broadcast b into all chains
//   1, c[CNT_W-1:0], d...  serial record: a CNT_W-bit count c (MSB first)
//                          followed by c bits, each shifted along the head
//                          cells of the chains
// A slice that needs serial mode is sent as a parallel record (the value of
// its trailing run) followed by a serial record for the remaining heads.
// The record layout follows the design's description; the width of the count
// field, CNT_W = clog2(N) bits (at most N-1 serial shifts are ever needed,
// since the last head can always take the broadcast value), the MSB-first
// order, and that a count of zero ends the record are this design's choices.
//
// Timing: the decoder is a Mealy machine with no pipeline. The clock on which
// a broadcast bit or a serial data bit is on tdi is the clock on which the
// chains perform that shift (ctrl.op = SCAN_PARALLEL / SCAN_SERIAL with
// ctrl.data = tdi); on the clocks that carry a configuration or count bit the
// chains hold. scan_en = 0 requests a functional capture (ctrl.op =
// SCAN_CAPTURE) and returns the decoder to the start of a record, so every
// test vector's stream starts cleanly. Asynchronous active-low reset.
module scan_stream_decoder
  import ps_scan_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned CNT_W = (N > 2) ? $clog2(N) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_en,  // 1: shift the test stream, 0: capture
  input  logic       tdi,      // test data stream bit
  output scan_ctrl_t ctrl,     // operation for the scan chains this clock
  output logic       rec_done  // last bit of a record is on tdi this clock
);

  typedef enum logic [1:0] {
    ST_CFG   = 2'd0,  // expecting a configuration selection bit
    ST_BVAL  = 2'd1,  // expecting the broadcast value
    ST_CNT   = 2'd2,  // collecting the serial shift count
    ST_SDATA = 2'd3   // shifting serial data bits
  } state_e;

  state_e             state_q, state_d;
  logic [CNT_W-1:0]   cnt_q, cnt_d;      // count being collected / remaining bits
  logic [$clog2(CNT_W+1)-1:0] nbits_q, nbits_d;  // count bits collected so far
  logic [CNT_W-1:0]   cnt_full;

  assign cnt_full = CNT_W'({cnt_q, tdi});

  always_comb begin
    ctrl.op   = SCAN_HOLD;
    ctrl.data = tdi;
    state_d   = state_q;
    cnt_d     = cnt_q;
    nbits_d   = nbits_q;
    rec_done  = 1'b0;

    if (!scan_en) begin
      ctrl.op = SCAN_CAPTURE;
      state_d = ST_CFG;
    end else begin
      unique case (state_q)
        ST_CFG: begin
          if (tdi) begin
            state_d = ST_CNT;
            cnt_d   = '0;
            nbits_d = '0;
          end else begin
            state_d = ST_BVAL;
          end
        end
        ST_BVAL: begin
          ctrl.op  = SCAN_PARALLEL;
          state_d  = ST_CFG;
          rec_done = 1'b1;
        end
        ST_CNT: begin
          cnt_d   = cnt_full;
          nbits_d = nbits_q + 1'b1;
          if (32'(nbits_q) == CNT_W - 1) begin
            if (cnt_full == '0) begin
              state_d  = ST_CFG;
              rec_done = 1'b1;
            end else begin
              state_d = ST_SDATA;
            end
          end
        end
        ST_SDATA: begin
          ctrl.op = SCAN_SERIAL;
          cnt_d   = cnt_q - 1'b1;
          if (cnt_q == CNT_W'(1)) begin
            state_d  = ST_CFG;
            rec_done = 1'b1;
          end
        end
        default: state_d = ST_CFG;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_CFG;
      cnt_q   <= '0;
      nbits_q <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      nbits_q <= nbits_d;
    end
  end

  // Stream rule: a serial record never asks for more shifts than there are
  // head cells before the last one.
  a_count_in_range : assert property (
    @(posedge clk) disable iff (!rst_n)
      (scan_en && state_q == ST_CNT && 32'(nbits_q) == CNT_W - 1)
        |-> (32'(cnt_full) <= N - 1))
    else $error("scan_stream_decoder: serial count %0d exceeds N-1", cnt_full);

endmodule
