// scb_buffer_ctrl: buffer controller of the self-compacting buffer.
//
// From the internal read and write requests and the insertion address it drives,
// per buffer row, one of three lines (at most one per row; none means hold):
//   wr_line[r] : row r loads the write bus
//   dn_line[r] : row r loads row r-1 (data moves down)
//   up_line[r] : row r loads row r+1 (data moves up; row 0's old content leaves
//                through the output port)
// and rd_out, which pushes row 0 to the output port.
//
// waddr is the insertion point: the start of the region that follows the written
// queue (pointer p+), i.e. the row just past the last entry of queue p.
//   case 1, single write : row waddr is written, rows below it move down.
//   case 2, single read  : every row moves up.
//   case 3, read + write : the write row is j = waddr-1 (0 if waddr is 0); rows
//                          above j move up, row j is written, rows below hold.
// A thermometer decoder (scb_thermo_decoder) produces the lines r >= j; the case
// selector turns them into the lines above. The case logic and the table of down/up
// lines follow the original description. Writing row waddr-1 in case 3 is read from
// that table, where the up lines cover the rows above the write row; the decrement
// that produces it, and the treatment of waddr = 0, are this design's choice.
// Purely combinational; the caller registers the request one cycle ahead.
module scb_buffer_ctrl
  import scb_pkg::*;
#(
  parameter int unsigned DEPTH = SCB_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH + 1)
) (
  input  logic             rd,       // internal read (already gated by empty)
  input  logic             wr,       // internal write (already gated by full)
  input  logic [AW-1:0]    waddr,    // insertion point, 0..DEPTH
  output scb_case_e        op,       // selected case
  output logic [DEPTH-1:0] wr_line,
  output logic [DEPTH-1:0] dn_line,
  output logic [DEPTH-1:0] up_line,
  output logic             rd_out
);

  logic [AW-1:0]    dec_addr;
  logic [DEPTH-1:0] therm;      // rows r >= dec_addr
  logic [DEPTH-1:0] first;      // the row at dec_addr

  assign op = scb_case_e'({rd, wr});

  // In case 3 the write row is one above the insertion point.
  always_comb begin
    if (op == SCB_RDWR && waddr != '0) dec_addr = waddr - AW'(1);
    else                               dec_addr = waddr;
  end

  scb_thermo_decoder #(.N(DEPTH), .AW(AW)) u_dec (
    .en   (1'b1),
    .addr (dec_addr),
    .line (therm)
  );

  assign first = therm & ~{therm[DEPTH-2:0], 1'b0};

  // Case selector.
  always_comb begin
    wr_line = '0;
    dn_line = '0;
    up_line = '0;
    rd_out  = 1'b0;
    unique case (op)
      SCB_WRITE: begin
        wr_line = first;
        dn_line = therm & ~first;
      end
      SCB_READ: begin
        up_line = '1;
        rd_out  = 1'b1;
      end
      SCB_RDWR: begin
        wr_line = first;
        up_line = ~therm;
        rd_out  = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
