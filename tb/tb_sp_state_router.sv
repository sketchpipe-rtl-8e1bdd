// tb_sp_state_router: random bitmaps over six arrays spread on three
// pipelines, with the orders "array 4 before array 1", "array 5 before
// array 0" and "array 0 before array 3". The expected target (lowest eligible array, its
// pipeline, or the home pipeline for an empty bitmap) is worked out here.
module tb_sp_state_router;
  import sp_pkg::*;
  localparam int unsigned NA = 6;
  localparam place_pipe_t PP = place_pipe_t'({8'd2, 8'd1, 8'd0, 8'd2, 8'd1, 8'd0});

  function automatic pred_t mk_pred();
    pred_t r;
    r = '0;
    r[1][4] = 1'b1;   // array 4 before array 1
    r[0][5] = 1'b1;   // array 5 before array 0
    r[3][0] = 1'b1;   // array 0 before array 3
    return r;
  endfunction
  localparam pred_t PR = mk_pred();

  int checks = 0, failures = 0;
  bitmap_t bitmap;
  pipe_t   home, dest;
  logic    sel_valid;
  logic [$clog2(MAX_ARRAYS)-1:0] sel_array;
  int      n_ordered = 0;

  sp_state_router #(.N_ARRAYS(NA), .ARRAY_PIPE(PP), .PRED(PR)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int exp_sel;
      bitmap = (t < 64) ? bitmap_t'(t) : bitmap_t'($urandom_range(63));
      home   = pipe_t'($urandom_range(7));
      #1;
      exp_sel = -1;
      for (int j = 0; j < NA; j++) begin
        logic blocked;
        blocked = (j == 1 && bitmap[4]) || (j == 0 && bitmap[5]) || (j == 3 && bitmap[0]);
        if (bitmap[j] && !blocked) begin exp_sel = j; break; end
      end
      if ((bitmap[4] && bitmap[1]) || (bitmap[5] && bitmap[0])) n_ordered++;
      checks++;
      if (sel_valid != (bitmap != 0)) failures++;
      checks++;
      if (bitmap == 0) begin
        if (dest != home) begin failures++; $display("empty bitmap: dest %0d home %0d", dest, home); end
      end else if (sel_array != exp_sel[5:0] || dest != PP[exp_sel]) begin
        failures++;
        $display("bitmap %b: got array %0d pipe %0d, expected %0d pipe %0d",
                 bitmap[NA-1:0], sel_array, dest, exp_sel, PP[exp_sel]);
      end
    end
    checks++;
    if (n_ordered == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
