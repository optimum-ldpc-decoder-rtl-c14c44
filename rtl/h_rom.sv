// h_rom: storage for the structure of the parity-check matrices.
//
// Each non-zero Z x Z sub-matrix of the information part of H (plus the
// first parity column, see below) is one 12-bit entry {shift[6:0], col[4:0]}.
// Four entries are packed into one 48-bit word, so the default 324 x 48 array
// holds 1296 entries, enough for the 1295 entries of the 18 standard
// matrices.  Entries are read one per cycle by entry address; the read is
// registered (one cycle latency) and word slot (addr % 4) is selected on the
// way out.
//
// The array is written through a word-wide load port: the matrices of the
// standards are not reproduced here, so they are loaded after reset (or the
// array can be replaced by a mask ROM with the same read port).  The
// dual-diagonal parity part is not stored; the controller generates it.
module h_rom
  import ldpc_pkg::*;
#(
  parameter int WORDS = 324,   // 48-bit words
  parameter int EPW   = 4,     // entries per word
  localparam int AW   = $clog2(WORDS*EPW),
  localparam int WAW  = $clog2(WORDS)
) (
  input  logic                 clk,
  // load port
  input  logic                 load_we,
  input  logic [WAW-1:0]       load_addr,
  input  logic [EPW*HEW-1:0]   load_data,
  // entry read port
  input  logic                 re,
  input  logic [AW-1:0]        raddr,
  output h_entry_t             rdata
);

  logic [EPW*HEW-1:0] mem [WORDS];
  logic [EPW*HEW-1:0] word_q;
  logic [$clog2(EPW)-1:0] slot_q;

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    if (re) begin
      word_q <= mem[WAW'(raddr / AW'(EPW))];
      slot_q <= ($clog2(EPW))'(raddr % AW'(EPW));
    end
  end

  assign rdata = h_entry_t'(word_q[slot_q*HEW +: HEW]);

endmodule
