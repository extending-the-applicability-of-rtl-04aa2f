// ps_scan_array: the parallel-serial scan design with N internal scan chains
// of L cells, loaded from a single scan input.
//
// Parallel (broadcast) mode, op = SCAN_PARALLEL: every chain shifts by one
// cell and every head cell loads the scan input, so one clock loads a whole
// test slice (the N cells at the same distance from the chain heads) with one
// value. Serial mode, op = SCAN_SERIAL: the head cells alone form one serial
// path, scan_in -> head of chain 0 -> head of chain 1 -> ... -> head of chain
// N-1, and shift by one place; all other cells hold. A slice whose values are
// not all equal is therefore loaded by one broadcast, which moves the earlier
// slices one level down and sets every head cell to the broadcast value,
// followed by m serial shifts that overwrite heads 0..m-1. If the last k heads
// (chains N-k..N-1) already want the broadcast value, m = N-k, so a slice costs
// N-k+1 clocks and never more than N. The serial path links head cells rather
// than chain ends, which is what lets the two modes alternate within one test
// vector; it needs one multiplexer per chain, as a chain-to-chain serial mode
// does.
//
// Each chain may carry its own serial transformation gates (TAPS, INV, see
// tx_scan_chain); all-zero defaults give plain chains.
// op = SCAN_CAPTURE loads the functional values, SCAN_HOLD keeps everything.
// Responses leave through scan_out[i], the tail of chain i, during the
// parallel shifts that load the next vector. All transfers are on the rising
// clock edge. Defaults N = 4, L = 4 are the four-chain, four-slice example of
// the design's description.
module ps_scan_array
  import ps_scan_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned L = 4,
  parameter logic [N-1:0][L-1:0][L-1:0] TAPS = '0,
  parameter logic [N-1:0][L-1:0]         INV  = '0
) (
  input  logic                      clk,
  input  scan_op_e                  op,
  input  logic                      scan_in,
  input  logic [N-1:0][L-1:0]       func_d,   // [chain][cell]
  output logic [N-1:0][L-1:0]       q,        // [chain][cell], cell 0 = head
  output logic [N-1:0]              scan_out  // chain tails
);

  logic [N-1:0] head;

  for (genvar i = 0; i < int'(N); i++) begin : g_chain
    logic ser_in;
    if (i == 0) begin : g_first
      assign ser_in = scan_in;
    end else begin : g_next
      assign ser_in = head[i-1];
    end

    tx_scan_chain #(
      .L    (L),
      .TAPS (TAPS[i]),
      .INV  (INV[i])
    ) u_chain (
      .clk      (clk),
      .op       (op),
      .bcast_in (scan_in),
      .ser_in   (ser_in),
      .func_d   (func_d[i]),
      .q        (q[i]),
      .head_out (head[i]),
      .scan_out (scan_out[i])
    );
  end

endmodule
