// tb_sp_sketch_array: drives one counter array stage with a random mix of
// normal and state packets, a query key every cycle and occasional epoch
// clears, and compares forwarded packets, bitmap clearing, the ordering rule
// (array 0 must precede this array 2), saturation and the query port with a
// testbench model of the counters.
module tb_sp_sketch_array;
  import sp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned NC = 256;
  localparam int unsigned ID = 2;
  localparam bitmap_t P = bitmap_t'(1);   // array 0 precedes array 2

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, epoch_clear = 0, in_valid = 0;
  pkt_t in_pkt = '0;
  logic out_valid, upd_state;
  pkt_t out_pkt;
  key_t q_key = '0;
  cnt_t q_count;

  longint unsigned model [NC];
  key_t keys [16];
  logic exp_valid;
  pkt_t exp_pkt;
  int n_upd = 0, n_blocked = 0, n_sat = 0;

  sp_sketch_array #(.ARRAY_ID(ID), .N_COUNTERS(NC), .PRED(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int unsigned cidx(key_t k);
    return ref_idx(k, ref_array_seed(ID), 8);
  endfunction

  initial begin
    foreach (keys[i]) keys[i] = $urandom;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // outputs of the previous cycle's packet
      if (cyc > 0) begin
        check("out_valid", out_valid, exp_valid);
        if (exp_valid) check("out_pkt", out_pkt, exp_pkt);
      end
      // query port: combinational view of the counters
      q_key = keys[$urandom_range(15)];
      #1;
      check("q_count", q_count, model[cidx(q_key)]);
      // new stimulus
      epoch_clear     = (cyc % 1000) == 999;
      in_valid        = $urandom_range(3) != 0;
      in_pkt          = '0;
      in_pkt.is_state = $urandom_range(1);
      in_pkt.key      = keys[$urandom_range(15)];
      in_pkt.seq      = SEQ_W'(cyc);
      in_pkt.cnt      = in_pkt.is_state ? cnt_t'($urandom_range(1, 50)) : cnt_t'(1);
      if (cyc >= 2000 && cyc < 2010) in_pkt.cnt = 32'hffff_fff0;   // saturation
      in_pkt.bitmap   = bitmap_t'($urandom_range(15));
      exp_valid = in_valid;
      exp_pkt   = in_pkt;
      #1;
      if (in_valid && !epoch_clear) begin
        longint unsigned add;
        logic doit;
        doit = !in_pkt.is_state || (in_pkt.bitmap[ID] && !in_pkt.bitmap[0]);
        add  = in_pkt.is_state ? in_pkt.cnt : 1;
        if (in_pkt.is_state && in_pkt.bitmap[ID] && in_pkt.bitmap[0]) n_blocked++;
        if (doit) begin
          model[cidx(in_pkt.key)] += add;
          if (model[cidx(in_pkt.key)] > 64'hffff_ffff) begin
            model[cidx(in_pkt.key)] = 64'hffff_ffff;
            n_sat++;
          end
          if (in_pkt.is_state) begin
            exp_pkt.bitmap[ID] = 1'b0;
            n_upd++;
          end
        end
        check("upd_state", upd_state, doit && in_pkt.is_state);
      end else if (in_valid) begin
        // clear wins over an update in the same cycle; the packet still passes
        if (in_pkt.is_state && in_pkt.bitmap[ID] && !in_pkt.bitmap[0]) exp_pkt.bitmap[ID] = 1'b0;
      end
      if (epoch_clear) foreach (model[i]) model[i] = 0;
    end
    checks++;
    if (n_upd == 0 || n_blocked == 0 || n_sat == 0) begin
      failures++;
      $display("coverage: updates=%0d blocked=%0d saturated=%0d", n_upd, n_blocked, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
