// tb_gamma_mem: random reads and masked writes to both banks of the
// posterior memory against a shadow copy; checks one-cycle read latency,
// per-sample write masks, independent banks and read-before-write on a
// same-address collision.
module tb_gamma_mem;
  import ldpc_pkg::*;

  localparam int P = 3, NBANK = 2, DEPTH = 384;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NBANK-1:0] re, we;
  logic [NBANK-1:0][8:0] raddr, waddr;
  msg_t [NBANK-1:0][P-1:0] rdata, wdata;
  logic [NBANK-1:0][P-1:0] wmask;

  gamma_mem dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int shadow [NBANK][DEPTH][P];
  int expv [NBANK][P];
  bit pend [NBANK];

  initial begin
    re = '0; we = '0; raddr = '0; waddr = '0; wdata = '0; wmask = '0;
    // initialise everything
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      for (int b = 0; b < NBANK; b++) begin
        we[b] = 1; waddr[b] = 9'(a); wmask[b] = '1;
        for (int s = 0; s < P; s++) begin
          wdata[b][s] = msg_t'(a * 3 + s + b * 7);
          shadow[b][a][s] = int'(msg_t'(a * 3 + s + b * 7));
        end
      end
    end
    @(negedge clk); we = '0;
    for (int t = 0; t < 20000; t++) begin
      // outputs of last cycle's reads
      for (int b = 0; b < NBANK; b++) if (pend[b]) begin
        for (int s = 0; s < P; s++) begin
          checks++;
          if (int'(rdata[b][s]) != expv[b][s]) begin
            failures++;
            if (failures < 10) $display("FAIL bank %0d sample %0d: %0d expected %0d", b, s, rdata[b][s], expv[b][s]);
          end
        end
      end
      for (int b = 0; b < NBANK; b++) begin
        re[b] = $urandom_range(1, 0); raddr[b] = 9'($urandom_range(DEPTH - 1, 0));
        we[b] = $urandom_range(1, 0);
        waddr[b] = (t % 5 == 0) ? raddr[b] : 9'($urandom_range(DEPTH - 1, 0));
        wmask[b] = 3'($urandom_range(7, 0));
        for (int s = 0; s < P; s++) wdata[b][s] = msg_t'($urandom_range(255, 0));
        pend[b] = re[b];
        if (re[b]) for (int s = 0; s < P; s++) expv[b][s] = shadow[b][raddr[b]][s];
        if (we[b]) for (int s = 0; s < P; s++) if (wmask[b][s]) shadow[b][waddr[b]][s] = int'(wdata[b][s]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
