// scb_top: self-compacting buffer (SCB), a dynamically allocated multi-queue for
// the output port of a router, scheduled with rotating priority queues (RPQ+).
//
// Data of priority 1..n is inserted at the end of its queue in one shift-register
// buffer kept sorted by region (0+, 1, 1+, ..., (n-1)+, n), and always read from row
// 0. Every clock accepts a read, a write, or a simultaneous read/write, plus an
// optional RPQ+ rotation (rpq), which merges each queue p with p+ and promotes the
// result to (p-1)+.
//
// Two pipeline stages, one clock each:
//   stage 1  scb_ptr_ctrl gates the requests by full/empty, scb_prio_ptrs update at
//            the end of the cycle, and the insertion address (pointer p+ before the
//            update), the case and the write data are registered;
//   stage 2  scb_buffer_ctrl decodes the registered request and scb_buffer moves
//            its rows at the end of the cycle; a read's row 0 lands in rd_data.
// A request presented in cycle t is accepted (w_ack/r_ack) combinationally in t;
// its pointer change is visible in cycle t+1 and a read's data appears with
// rd_valid in cycle t+2. Because the pointers run one stage ahead of the buffer,
// back-to-back requests need no stall. full, empty and count describe the buffer
// including the request in stage 2.
// The blocks and the two-stage overlap follow the original description; the port
// list, the acknowledges and the output register are this design's choice.
module scb_top
  import scb_pkg::*;
#(
  parameter int unsigned DEPTH = SCB_DEPTH,
  parameter int unsigned WIDTH = SCB_WIDTH,
  parameter int unsigned NPRIO = SCB_NPRIO,
  localparam int unsigned AW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = $clog2(NPRIO + 1),
  localparam int unsigned NP   = 2 * NPRIO
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // requests from the switch side and the output port
  input  logic                  r_ext,     // read request
  input  logic                  w_ext,     // write request
  input  logic [PW-1:0]         prio,      // priority of the written data, 1..n
  input  logic [WIDTH-1:0]      wdata,     // written data
  input  logic                  rpq,       // RPQ+ rotation (every Delta time units)
  output logic                  w_ack,     // write accepted this cycle
  output logic                  r_ack,     // read accepted this cycle
  // output port
  output logic                  rd_valid,
  output logic [WIDTH-1:0]      rd_data,
  // status
  output logic                  full,
  output logic                  empty,
  output logic [AW-1:0]         count,
  output logic [NP-1:0][AW-1:0] ptr,       // region start rows, numbering in scb_pkg
  output scb_case_e             buf_case   // case executed by the buffer this cycle
);

  // stage 1
  logic [NP-1:0] add, sub;
  logic          rpq1, rpq2;
  logic          rd_int, wr_int;
  logic [AW-1:0] waddr;

  scb_ptr_ctrl #(.NPRIO(NPRIO), .DEPTH(DEPTH), .AW(AW), .PW(PW)) u_ptr_ctrl (
    .r_ext   (r_ext),
    .w_ext   (w_ext),
    .prio    (prio),
    .rpq_ext (rpq),
    .ptr     (ptr),
    .add     (add),
    .sub     (sub),
    .rpq1    (rpq1),
    .rpq2    (rpq2),
    .rd_int  (rd_int),
    .wr_int  (wr_int),
    .waddr   (waddr),
    .full    (full),
    .empty   (empty),
    .count   (count)
  );

  scb_prio_ptrs #(.NPRIO(NPRIO), .DEPTH(DEPTH), .AW(AW)) u_ptrs (
    .clk   (clk),
    .rst_n (rst_n),
    .add   (add),
    .sub   (sub),
    .rpq1  (rpq1),
    .rpq2  (rpq2),
    .ptr   (ptr)
  );

  assign w_ack = wr_int;
  assign r_ack = rd_int;

  // stage 1 -> stage 2 register
  logic             s2_rd, s2_wr;
  logic [AW-1:0]    s2_waddr;
  logic [WIDTH-1:0] s2_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_rd    <= 1'b0;
      s2_wr    <= 1'b0;
      s2_waddr <= '0;
      s2_wdata <= '0;
    end else begin
      s2_rd    <= rd_int;
      s2_wr    <= wr_int;
      s2_waddr <= waddr;
      if (wr_int) s2_wdata <= wdata;
    end
  end

  // stage 2
  logic [DEPTH-1:0] wr_line, dn_line, up_line;
  logic             rd_out;

  scb_buffer_ctrl #(.DEPTH(DEPTH), .AW(AW)) u_buf_ctrl (
    .rd      (s2_rd),
    .wr      (s2_wr),
    .waddr   (s2_waddr),
    .op      (buf_case),
    .wr_line (wr_line),
    .dn_line (dn_line),
    .up_line (up_line),
    .rd_out  (rd_out)
  );

  scb_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_line  (wr_line),
    .dn_line  (dn_line),
    .up_line  (up_line),
    .rd_out   (rd_out),
    .wbus     (s2_wdata),
    .rd_valid (rd_valid),
    .rd_data  (rd_data)
  );

endmodule
