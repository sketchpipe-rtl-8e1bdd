// tb_sp_pktgen: starts the generator of pipeline 3 with 8 cache entries
// under a random ready signal and checks that exactly one state packet per
// entry comes out, in index order, with an empty bitmap and home 3; that a
// start while busy is ignored; and that a second start injects a new set.
// A third set runs with gap = 5 and ready always high: packets must come
// out exactly 6 cycles apart.
module tb_sp_pktgen;
  import sp_pkg::*;
  localparam int unsigned DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, out_valid, out_ready = 0;
  logic [15:0] gap = '0;
  pkt_t out_pkt;
  logic [31:0] generated;
  int taken = 0;

  sp_pktgen #(.PIPE_ID(3), .CACHE_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run_set(int base, bit always_ready);
    int n = 0, last = -1, cyc = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk("busy after start", busy, 1);
    while (busy) begin
      out_ready = always_ready || $urandom_range(2) == 0;
      if (n == 3) start = 1;             // ignored while busy
      #1;
      if (out_valid && out_ready) begin
        chk("is_state", out_pkt.is_state, 1);
        chk("home", out_pkt.home, 3);
        chk("idx", out_pkt.idx, n);
        chk("bitmap", out_pkt.bitmap, 0);
        if (always_ready && last >= 0) chk("spacing", cyc - last, int'(gap) + 1);
        last = cyc;
        n++;
      end
      @(negedge clk);
      cyc++;
      start = 0;
    end
    chk("packets in set", n, DEPTH);
    chk("generated", generated, base + DEPTH);
    out_ready = 1;
    repeat (3) @(negedge clk);
    chk("quiet after set", out_valid, 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle after reset", out_valid, 0);
    run_set(0, 0);
    run_set(DEPTH, 0);
    gap = 5;
    run_set(2 * DEPTH, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
