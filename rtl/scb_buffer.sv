// scb_buffer: storage array of the self-compacting buffer.
//
// DEPTH rows of WIDTH bits. Every cell of a row shares that row's control lines and
// every cell of a column shares the write bus, so each row, on a clock edge, does
// one of: hold, load the write bus, load the row above it (dn_line: data moves
// down) or load the row below it (up_line: data moves up). When rd_out is set the
// content of row 0, the head of the buffer, is captured in the output register
// (rd_valid/rd_data valid the cycle after the update). Row DEPTH-1 loads zero when
// it shifts up. A row can shift and another row be written on the same edge, as the
// original cell allows. The row actions follow the original description; the output
// register and the reset of the contents are this design's choice.
// An assertion checks that at most one control line is active per row.
module scb_buffer
  import scb_pkg::*;
#(
  parameter int unsigned DEPTH = SCB_DEPTH,
  parameter int unsigned WIDTH = SCB_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEPTH-1:0] wr_line,
  input  logic [DEPTH-1:0] dn_line,
  input  logic [DEPTH-1:0] up_line,
  input  logic             rd_out,
  input  logic [WIDTH-1:0] wbus,      // write bus
  output logic             rd_valid,  // output port
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] row        [DEPTH];
  logic [WIDTH-1:0] from_above [DEPTH];  // content of row r-1 (zero for row 0)
  logic [WIDTH-1:0] from_below [DEPTH];  // content of row r+1 (zero for the last row)

  for (genvar r = 0; r < DEPTH; r++) begin : g_nb
    if (r == 0) begin : g_top
      assign from_above[r] = '0;
    end else begin : g_mid
      assign from_above[r] = row[r-1];
    end
    if (r == DEPTH - 1) begin : g_last
      assign from_below[r] = '0;
    end else begin : g_rest
      assign from_below[r] = row[r+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < DEPTH; r++) row[r] <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      for (int unsigned r = 0; r < DEPTH; r++) begin
        if (wr_line[r])      row[r] <= wbus;
        else if (dn_line[r]) row[r] <= from_above[r];
        else if (up_line[r]) row[r] <= from_below[r];
      end
      rd_valid <= rd_out;
      if (rd_out) rd_data <= row[0];
    end
  end

  // At most one action per row.
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    ((wr_line & dn_line) | (wr_line & up_line) | (dn_line & up_line)) == '0)
    else $error("scb_buffer: a row has more than one action");

endmodule
