// scb_ptr_cell: one priority pointer of the self-compacting buffer.
//
// Holds a buffer address (AW bits). Each clock edge it either loads load_val (the
// RPQ+ rotation copies a neighbouring pointer), or adds 1, subtracts 1, or holds.
// The increment/decrement is a ripple chain as in the original pointer cell: the
// carry into bit 0 is (add | sub), each sum bit is the stored bit XOR the carry in,
// and the carry out equals the carry in when the stored bit is 1 (add) or 0 (sub)
// and is killed otherwise. Reset clears the pointer to address 0 (empty buffer).
// nxt_rw is the value after add/sub only; nxt is the value that will be stored,
// rotation included. Neighbouring cells chain them combinationally to do the two
// rotation steps in one clock. add and sub must not be set together. The cell's
// function follows the original description; the single-clock register, the load
// input and the asynchronous reset are this design's choice.
module scb_ptr_cell #(
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          add,
  input  logic          sub,
  input  logic          load,       // RPQ+ rotation: copy load_val
  input  logic [AW-1:0] load_val,
  output logic [AW-1:0] q,          // stored address
  output logic [AW-1:0] nxt_rw,     // q after add/sub
  output logic [AW-1:0] nxt         // value stored on the next edge
);

  logic [AW:0]   c;   // carry chain
  logic [AW-1:0] sum;

  assign c[0] = add | sub;

  for (genvar i = 0; i < AW; i++) begin : g_bit
    assign sum[i]  = q[i] ^ c[i];
    assign c[i+1]  = (add & q[i] & c[i]) | (sub & ~q[i] & c[i]);
  end

  assign nxt_rw = (add || sub) ? sum : q;
  assign nxt    = load ? load_val : nxt_rw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= nxt;
  end

  a_add_sub_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(add && sub))
    else $error("scb_ptr_cell: add and sub together");

endmodule
