// tb_scb_buffer_ctrl: exhaustive test of the buffer controller. For every
// combination of read, write and insertion address the per-row write, down and up
// lines and the read-out line are compared with the three cases worked out row by
// row: single write at a (row a written, rows past a move down), single read (every
// row moves up) and read + write at a (row j = max(a-1, 0) written, rows before j
// move up, the rest hold).
module tb_scb_buffer_ctrl;
  import scb_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH + 1);

  logic             rd, wr, rd_out;
  logic [AW-1:0]    waddr;
  scb_case_e        op;
  logic [DEPTH-1:0] wr_line, dn_line, up_line;

  scb_buffer_ctrl #(.DEPTH(DEPTH), .AW(AW)) dut (.rd, .wr, .waddr, .op, .wr_line, .dn_line, .up_line, .rd_out);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL rd=%0b wr=%0b waddr=%0d: %s", rd, wr, waddr, what);
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin
      // single write and simultaneous read/write may not use address DEPTH unless a
      // read frees a row; cover every address the pointer controller can produce
      for (int a = 0; a <= DEPTH; a++) begin
        bit ew, ed, eu;
        int j;
        rd = c[1];
        wr = c[0];
        waddr = AW'(a);
        if (wr && !rd && a == DEPTH) continue;
        #1;
        j = (a == 0) ? 0 : a - 1;
        check(op == scb_case_e'(c), "op");
        check(rd_out == rd, "rd_out");
        for (int r = 0; r < DEPTH; r++) begin
          ew = 0; ed = 0; eu = 0;
          if (wr && !rd) begin
            ew = (r == a);
            ed = (r > a);
          end else if (rd && !wr) begin
            eu = 1;
          end else if (rd && wr) begin
            ew = (r == j);
            eu = (r < j);
          end
          check(wr_line[r] == ew, $sformatf("wr_line[%0d]", r));
          check(dn_line[r] == ed, $sformatf("dn_line[%0d]", r));
          check(up_line[r] == eu, $sformatf("up_line[%0d]", r));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
