// vecliw_pipe_reg: one pipeline register of the VecLIW pipeline.
//
// Used for the IF/ID, ID/EX, EX/MEM and MEM/WB registers, each with its own
// struct type T from vecliw_pkg. On a rising edge it loads d when en is
// high, holds when en is low (stall), and loads the all-zero bubble when
// flush is high (flush wins over en). An all-zero payload is a bubble in
// every stage: no register write, no memory access, invalid instruction.
// The four registers are the document's; their stall and flush controls
// are this design's choice.
module vecliw_pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic flush,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (flush) q <= '0;
    else if (en)    q <= d;
  end
endmodule
