// tx_scan_chain: one internal scan chain with serial on-chip transformation
// gates and the head-cell mode multiplexer of the parallel-serial scan design.
//
// The chain has L scan cells q[0] (head, next to the scan input) .. q[L-1]
// (tail, driving scan_out). Bijective transformation gates may sit on the shift
// path: when the chain shifts, cell j (j >= 1) loads
//     q[j-1] ^ INV[j] ^ XOR of all q[i] with TAPS[j][i] = 1,
// where only cells upstream of q[j-1] (i <= j-2) may be tapped, so each inserted
// XOR gate adds an earlier cell of the same chain into the shift path. Because
// a bit shifted in only ever affects cells further down, the mapping from the
// shifted-in stimulus S to the loaded vector I is triangular and therefore
// invertible: I = S x T, S = I x T^-1. Like the XOR gates, inverters sit
// between cells (INV[j], j >= 1); the head cell always takes the broadcast or
// serial value as it is, so that all head cells agree after a broadcast and a
// serial shift along the heads keeps that value in the heads it does not
// overwrite.
//
// The head cell has a two-way multiplexer: in parallel (broadcast) mode it
// loads the broadcast line, in serial mode it loads ser_in, the head cell of
// the preceding chain (or the scan input for the first chain), and then only
// the head cell changes; the rest of the chain holds, preserving the slices
// already loaded.
//
// op (one per clock, see ps_scan_pkg):
//   SCAN_PARALLEL : q[0] <= bcast_in;   q[j] <= transformed q[j-1]
//   SCAN_SERIAL   : q[0] <= ser_in;     q[j] hold
//   SCAN_CAPTURE  : q    <= func_d
//   SCAN_HOLD     : q hold
// All updates happen on the rising clock edge; outputs come straight from the
// cells. The scan cells have no reset, as scan flip-flops usually do not:
// their content is defined by a load.
//
// Default parameters rebuild the five-cell example chain of the design's
// transformation section: two XOR gates, cell 0 into the input of cell 2 and
// cell 1 into the input of cell 4, which turn the shifted stimulus 11010 into
// the loaded vector 11111 (strings listed from the head cell, bit k being the
// value that ends in cell k). The placement of the two gates is the unique
// two-gate placement that gives that mapping. Holding the body cells in
// serial mode by an enable is this design's choice.
module tx_scan_chain
  import ps_scan_pkg::*;
#(
  parameter int unsigned L = 5,
  // TAPS[j][i] = 1: XOR gate feeding cell i into the shift input of cell j
  parameter logic [L-1:0][L-1:0] TAPS =
      (L >= 5) ? (((L*L)'(1) << (2*L + 0)) | ((L*L)'(1) << (4*L + 1))) : '0,
  // INV[j] = 1: inverter in the shift input of cell j (j >= 1)
  parameter logic [L-1:0] INV = '0
) (
  input  logic           clk,
  input  scan_op_e       op,
  input  logic           bcast_in,  // broadcast line (parallel mode)
  input  logic           ser_in,    // serial path into the head cell
  input  logic [L-1:0]   func_d,    // functional next-state values to capture
  output logic [L-1:0]   q,         // scan cell contents, q[0] = head
  output logic           head_out,  // head cell, feeds the next chain's head
  output logic           scan_out   // tail cell
);

  // Only upstream taps keep the transformation bijective.
  function automatic bit taps_legal();
    for (int j = 0; j < int'(L); j++)
      for (int i = 0; i < int'(L); i++)
        if (TAPS[j][i] && (i > j - 2)) return 1'b0;
    return 1'b1;
  endfunction

  if (L < 2) begin : g_bad_len
    $error("tx_scan_chain: L must be at least 2");
  end
  if (INV[0]) begin : g_bad_inv
    $error("tx_scan_chain: INV[0] must be 0, the head cell has no shift gate");
  end
  if (!taps_legal()) begin : g_bad_taps
    $error("tx_scan_chain: TAPS[j][i] may only be set for i <= j-2");
  end

  logic [L-1:0] shift_d;

  always_comb begin
    shift_d[0] = bcast_in;
    for (int j = 1; j < int'(L); j++)
      shift_d[j] = q[j-1] ^ INV[j] ^ (^(q & TAPS[j]));
  end

  always_ff @(posedge clk) begin
    unique case (op)
      SCAN_PARALLEL: q    <= shift_d;
      SCAN_SERIAL:   q[0] <= ser_in;
      SCAN_CAPTURE:  q    <= func_d;
      default:       ;
    endcase
  end

  assign head_out = q[0];
  assign scan_out = q[L-1];

endmodule
