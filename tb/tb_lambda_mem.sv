// tb_lambda_mem: writes random compressed records to all 384 entries of an
// extrinsic memory, reads them back in random order, and checks the data,
// the one-cycle latency, that the output holds between reads, and that only
// the addressed partition is enabled.
module tb_lambda_mem;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic re, we;
  logic [8:0] raddr, waddr;
  lam_rec_t rdata, wdata;
  logic [3:0] part_en;

  lambda_mem dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lam_rec_t shadow [384];

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    re = 0; we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int a = 0; a < 384; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a);
      wdata = lam_rec_t'({$urandom, $urandom});
      shadow[a] = wdata;
      #1 chk(part_en == 4'(1 << (a / 96)), $sformatf("write enable of entry %0d: %b", a, part_en));
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = $urandom_range(383, 0);
      re = 1; raddr = 9'(a);
      #1 chk(part_en == 4'(1 << (a / 96)), "read enable");
      @(negedge clk);
      re = 0;
      chk(rdata == shadow[a], $sformatf("entry %0d", a));
      @(negedge clk);
      chk(rdata == shadow[a], "output held");
      chk(part_en == '0, "idle partitions enabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
