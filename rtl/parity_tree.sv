// parity_tree -- odd-parity bit generator for the 16-bit data word.
//
// A balanced tree of two-input exclusive-OR gates: eight gates on the
// sixteen inputs, then four, two and one.  Fifteen inputs carry the word
// bits (three BCD digits, overrange, two spares); the sixteenth is tied to
// logic 1, so the tree output is 1 when the fifteen bits hold an even number
// of ones.  The full 16-bit word (bits plus parity) then always has an odd
// number of ones, and an all-zero reading is distinguishable from "no
// information".
//
// Interface: data[14:0], parity.  Purely combinational.
// Tree shape and odd parity follow the published design; tying the spare
// sixteenth input high is this design's choice.
module parity_tree (
  input  logic [14:0] data,
  output logic        parity
);
  logic [15:0] l0;
  logic [7:0]  l1;
  logic [3:0]  l2;
  logic [1:0]  l3;

  assign l0 = {1'b1, data};

  for (genvar i = 0; i < 8; i++) begin : g_l1
    assign l1[i] = l0[2*i] ^ l0[2*i+1];
  end
  for (genvar i = 0; i < 4; i++) begin : g_l2
    assign l2[i] = l1[2*i] ^ l1[2*i+1];
  end
  for (genvar i = 0; i < 2; i++) begin : g_l3
    assign l3[i] = l2[2*i] ^ l2[2*i+1];
  end
  assign parity = l3[0] ^ l3[1];
endmodule
