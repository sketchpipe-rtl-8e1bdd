// sp_hash: seeded hash of a flow key to an index.
//
// Every sketch array and every cache computes its own index from the flow
// key with an independent hash function. Switch ASICs provide CRC-style hash
// units; which function is used is not fixed by the design, so this block
// uses a 32-bit integer mixer (xor with a seed, then two xor-shift/multiply
// rounds) that spreads keys well and needs two multipliers. The index is the
// low OUT_W bits of the mixed word.
//
// Interface: key and seed in, idx out. Purely combinational, zero latency.
module sp_hash #(
  parameter int unsigned OUT_W = 16
) (
  input  logic [31:0]      key,
  input  logic [31:0]      seed,
  output logic [OUT_W-1:0] idx
);
  logic [31:0] x0, x1, x2, x3, x4;

  always_comb begin
    x0  = key ^ seed;
    x1  = x0 ^ (x0 >> 16);
    x2  = x1 * 32'h7feb_352d;
    x3  = (x2 ^ (x2 >> 15)) * 32'h846c_a68b;
    x4  = x3 ^ (x3 >> 16);
    idx = x4[OUT_W-1:0];
  end
endmodule
