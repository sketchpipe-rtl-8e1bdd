// tb_sp_cm_query: random counter sets and masks; the expected count-min
// estimate (minimum over the masked arrays, 0 for an empty mask) and the
// heavy flag are computed here.
module tb_sp_cm_query;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  cnt_t    counts [MAX_ARRAYS];
  bitmap_t mask;
  cnt_t    threshold, estimate;
  logic    heavy;

  sp_cm_query dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint unsigned m;
      logic any;
      foreach (counts[j]) counts[j] = (t % 2) ? $urandom_range(20000) : $urandom;
      mask      = {$urandom, $urandom};
      if (t % 5 == 0) mask = bitmap_t'(1) << $urandom_range(63);
      if (t == 7) mask = '0;
      threshold = $urandom_range(20000);
      #1;
      m = 64'hffff_ffff_ffff_ffff; any = 0;
      foreach (counts[j]) if (mask[j]) begin any = 1; if (counts[j] < m) m = counts[j]; end
      if (!any) m = 0;
      checks++;
      if (estimate != cnt_t'(m)) begin failures++; $display("estimate %0d expected %0d", estimate, m); end
      checks++;
      if (heavy != (any && m >= threshold)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
