// scb_prio_ptrs: the priority pointers of the self-compacting buffer.
//
// 2n pointer cells (scb_ptr_cell) hold the start row of queues 1, 1+, 2, 2+, ...,
// (n-1)+, n and of the free space (numbering in scb_pkg). add[k]/sub[k] from the
// pointer controller move pointer k by one row. The RPQ+ rotation is wired in:
//   rpq1 (concatenation): each p+ pointer (p = 1..n-1) copies pointer p+1, so
//        queue p absorbs queue p+;
//   rpq2 (promotion): each p pointer (p = 1..n-1) copies the new p+ pointer, so
//        the merged queue p becomes queue (p-1)+ and queues p, p+ are empty.
// Queue n and the free pointer are not moved by a rotation. The copies use the
// values after this cycle's add/sub, and rpq2 uses the result of rpq1, so a
// read/write and both rotation steps can share one clock edge. The wiring follows
// the original description; doing both steps on one edge is this design's choice.
module scb_prio_ptrs
  import scb_pkg::*;
#(
  parameter int unsigned NPRIO = SCB_NPRIO,
  parameter int unsigned DEPTH = SCB_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH + 1),
  localparam int unsigned NP   = 2 * NPRIO
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NP-1:0]          add,
  input  logic [NP-1:0]          sub,
  input  logic                   rpq1,
  input  logic                   rpq2,
  output logic [NP-1:0][AW-1:0]  ptr
);

  logic [NP-1:0][AW-1:0] nxt_rw;
  logic [NP-1:0][AW-1:0] nxt;
  logic [NP-1:0][AW-1:0] load_val;
  logic [NP-1:0]         load;

  for (genvar k = 0; k < NP; k++) begin : g_ptr
    if (k % 2 == 1 && k < NP - 1) begin : g_plus
      // pointer p+ (k = 2p-1): concatenation copies pointer p+1
      assign load[k]     = rpq1;
      assign load_val[k] = nxt_rw[k+1];
    end else if (k % 2 == 0 && k < NP - 2) begin : g_queue
      // pointer p (k = 2p-2): promotion copies the new pointer p+
      assign load[k]     = rpq2;
      assign load_val[k] = nxt[k+1];
    end else begin : g_fixed
      // pointer n and the free pointer
      assign load[k]     = 1'b0;
      assign load_val[k] = '0;
    end

    scb_ptr_cell #(.AW(AW)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .add      (add[k]),
      .sub      (sub[k]),
      .load     (load[k]),
      .load_val (load_val[k]),
      .q        (ptr[k]),
      .nxt_rw   (nxt_rw[k]),
      .nxt      (nxt[k])
    );
  end

endmodule
