// head_prefetch: keeps the head flit of an input buffer on the buffer's output.
//
// The buffer's read data is registered, so a flit is only visible after it
// has been read. This small controller reads the buffer whenever its output
// register holds no unconsumed flit, or holds one that is being erased
// (granted) in this cycle, so that a granted input presents its next flit in
// the very next cycle. head_valid tells whether the buffer output currently
// holds a flit waiting to be routed. Reading ahead of the grant is this
// design's choice; the document's router drawing shows a small block and an
// OR gate in front of each input buffer's read enable without naming them.
module head_prefetch (
  input  logic clk,
  input  logic rst,
  input  logic buf_empty,   // input buffer holds no flit
  input  logic erase,       // head flit was granted this cycle
  output logic rd_en,       // read enable to the input buffer
  output logic head_valid   // buffer output holds a waiting flit
);

  assign rd_en = !buf_empty && (!head_valid || erase);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        head_valid <= 1'b0;
    else if (rd_en) head_valid <= 1'b1;
    else if (erase) head_valid <= 1'b0;
  end

  a_erase_valid : assert property (@(posedge clk) disable iff (rst)
    erase |-> head_valid);

endmodule
