// shuffle_fwd: the forward shuffling unit (pi) between the posterior memory
// and the processing units.
//
// The P rows handled together need P consecutive samples of a block column,
// starting at offset off inside the lower word: samples off..P-1 of the lower
// word followed by samples 0..off-1 of the next word.  The unit concatenates
// the two words read from the banks and rotates them by off, so unit p gets
// sample off+p.  When both words sit in the same bank they arrive one cycle
// apart: load_reg keeps the lower word in the unit's register and use_reg
// takes it from there on the following cycle.
//
// Purely combinational on the data path (out follows rdata in the same
// cycle); only the holding and leftover registers are clocked.  The
// leftover store follows the shuffling unit register with samples kept for
// later use of the source design; the rest is this design's own.  A rotator built from
// multiplexers stands in for the Benes network the original sizing assumed.
module shuffle_fwd
  import ldpc_pkg::*;
#(
  parameter int P     = 3,
  parameter int NBANK = 2,
  localparam int BW   = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int OW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic                    clk,
  input  msg_t [NBANK-1:0][P-1:0] rdata,
  input  logic                    in_valid,
  input  logic [BW-1:0]           lo_bank,
  input  logic [BW-1:0]           hi_bank,
  input  logic                    use_reg,
  input  logic                    use_left,
  input  logic [IDXW-1:0]         idx,
  input  logic                    load_reg,
  input  logic [OW-1:0]           off,
  output logic                    out_valid,
  output msg_t [P-1:0]            out
);

  msg_t [P-1:0]   hold_q;
  msg_t [P-1:0]   lo_w, hi_w;
  msg_t [2*P-1:0] cat;

  msg_t [P-1:0]   left_q [CMAX];

  always_ff @(posedge clk) begin
    if (load_reg) hold_q <= rdata[lo_bank];
    if (in_valid && off != '0) left_q[idx] <= hi_w;
  end

  always_comb begin
    if (use_left)     lo_w = left_q[idx];
    else if (use_reg) lo_w = hold_q;
    else              lo_w = rdata[lo_bank];
    hi_w = rdata[hi_bank];
    cat  = {hi_w, lo_w};
    for (int p = 0; p < P; p++) out[p] = cat[int'(off) + p];
  end

  assign out_valid = in_valid;

endmodule
