// tb_proc_unit: random rows pass through the processing unit twice, the
// first time with lambda taken as zero, the second time with the record the
// unit produced the first time.  The new posteriors (rho + Lambda, both
// saturated to +/-127) are compared with a direct model of the row update.
// The read stage takes one edge per cycle and the writeback stage one edge
// per cycle, so a row of degree c costs 2c cycles here.
module tb_proc_unit;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            clr, in_valid, lam_zero;
  logic [IDXW-1:0] in_idx, wb_idx;
  msg_t            gamma_in, gamma_out;
  lam_rec_t        lam_rec, rec_out;

  proc_unit dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int satv(int x);
    return x > 127 ? 127 : (x < -127 ? -127 : x);
  endfunction

  int g [CMAX], lamv [CMAX], rho [CMAX];

  task automatic do_row(input int c, input bit first);
    int t0, t1;
    @(negedge clk); clr = 1'b1; lam_zero = first;
    @(negedge clk); clr = 1'b0;
    t0 = $time;
    for (int j = 0; j < c; j++) begin
      in_valid = 1'b1; in_idx = IDXW'(j); gamma_in = msg_t'(g[j]);
      rho[j] = satv(g[j] - (first ? 0 : lamv[j]));
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int j = 0; j < c; j++) begin
      int mn = 1000, sg = 0, L;
      for (int k = 0; k < c; k++) if (k != j) begin
        int a = rho[k] < 0 ? -rho[k] : rho[k];
        if (a < mn) mn = a;
        if (rho[k] < 0) sg ^= 1;
      end
      mn = (mn * 3) / 4;
            if (mn > 31) mn = 31;
      L = sg ? -mn : mn;
      wb_idx = IDXW'(j);
      #1;
      checks++;
      if (int'(gamma_out) != satv(rho[j] + L)) begin
        failures++;
        if (failures < 10) $display("FAIL edge %0d: %0d expected %0d", j, gamma_out, satv(rho[j] + L));
      end
      lamv[j] = L;
      @(negedge clk);
    end
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 2 * c) begin
      failures++;
      $display("FAIL: row took %0d cycles", (t1 - t0) / 10);
    end
    lam_rec = rec_out;
  endtask

  initial begin
    clr = 0; in_valid = 0; lam_zero = 1; in_idx = '0; wb_idx = '0; gamma_in = '0; lam_rec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int c;
      c = $urandom_range(CMAX, 2);
      for (int j = 0; j < c; j++) g[j] = $urandom_range(254, 0) - 127;
      do_row(c, 1'b1);
      for (int j = 0; j < c; j++) g[j] = $urandom_range(254, 0) - 127;
      do_row(c, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
