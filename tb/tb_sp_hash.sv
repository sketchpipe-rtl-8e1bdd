// tb_sp_hash: checks the hash unit against the reference mixer for random
// keys and seeds at two output widths, and checks that consecutive keys
// spread evenly over 16 buckets.
module tb_sp_hash;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] key, seed;
  logic [15:0] idx16;
  logic [3:0]  idx4;
  int bucket [16];

  sp_hash #(.OUT_W(16)) dut16 (.key, .seed, .idx(idx16));
  sp_hash #(.OUT_W(4))  dut4  (.key, .seed, .idx(idx4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      key  = $urandom;
      seed = (i % 3 == 0) ? 32'h0 : $urandom;
      #1;
      checks++;
      if (idx16 != 16'(ref_idx(key, seed, 16))) begin
        failures++;
        $display("mismatch key=%h seed=%h got %h exp %h", key, seed, idx16, ref_idx(key, seed, 16));
      end
      checks++;
      if (idx4 != 4'(ref_idx(key, seed, 4))) failures++;
    end
    foreach (bucket[b]) bucket[b] = 0;
    seed = 32'h9e3779b9;
    for (int i = 0; i < 4096; i++) begin
      key = i;
      #1;
      bucket[idx4]++;
    end
    foreach (bucket[b]) begin
      checks++;
      if (bucket[b] < 180 || bucket[b] > 340) begin
        failures++;
        $display("bucket %0d holds %0d of 4096", b, bucket[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
