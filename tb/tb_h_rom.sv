// tb_h_rom: fills the 324 x 48 H storage with random words through the load
// port, then reads every one of the 1296 12-bit entries by entry address and
// checks shift and column fields and the one-cycle read latency.
module tb_h_rom;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic load_we, re;
  logic [8:0] load_addr;
  logic [47:0] load_data;
  logic [10:0] raddr;
  h_entry_t rdata;

  h_rom dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [47:0] img [324];
  initial begin
    load_we = 0; re = 0; load_addr = '0; load_data = '0; raddr = '0;
    for (int w = 0; w < 324; w++) begin
      img[w] = {$urandom, $urandom};
      @(negedge clk); load_we = 1; load_addr = 9'(w); load_data = img[w];
    end
    @(negedge clk); load_we = 0;
    for (int e = 0; e < 1296; e++) begin
      logic [11:0] x;
      x = img[e / 4][(e % 4) * 12 +: 12];
      re = 1; raddr = 11'(e);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata.shift != x[11:5] || rdata.col != x[4:0]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d: %h expected %h", e, rdata, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
