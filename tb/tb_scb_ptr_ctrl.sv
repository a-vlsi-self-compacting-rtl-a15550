// tb_scb_ptr_ctrl: random test of the priority pointer controller. It draws a
// random, non-decreasing set of pointers (region starts, the last one the entry
// count), random requests and priorities (including the invalid 0), and compares
// every output with values worked out from the region picture: the read is served
// unless the buffer is empty, the write unless it is full without a read or the
// priority is invalid; the insertion address is the start of the region after
// queue p; a pointer moves up when it lies past queue p and a write is served, and
// moves down when a read is served and the pointer is not 0, and holds when both or
// neither apply. It also steps through the three rows of the priority-3 example
// table for writes.
module tb_scb_ptr_ctrl;
  import scb_pkg::*;
  localparam int unsigned NPRIO = 3;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW    = $clog2(DEPTH + 1);
  localparam int unsigned PW    = $clog2(NPRIO + 1);
  localparam int unsigned NP    = 2 * NPRIO;

  logic                  r_ext, w_ext, rpq_ext;
  logic [PW-1:0]         prio;
  logic [NP-1:0][AW-1:0] ptr;
  logic [NP-1:0]         add, sub;
  logic                  rpq1, rpq2, rd_int, wr_int, full, empty;
  logic [AW-1:0]         waddr, count;

  scb_ptr_ctrl #(.NPRIO(NPRIO), .DEPTH(DEPTH), .AW(AW), .PW(PW)) dut (
    .r_ext, .w_ext, .prio, .rpq_ext, .ptr, .add, .sub, .rpq1, .rpq2,
    .rd_int, .wr_int, .waddr, .full, .empty, .count
  );

  int unsigned checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: r=%0b w=%0b prio=%0d count=%0d", what, r_ext, w_ext, prio, ptr[NP-1]);
    end
  endtask

  // Expected A lines for a write, from the 3-level example table: a write into
  // priority 1 raises A for 1+, 2, 2+, 3, free; priority 2 for 2+, 3, free;
  // priority 3 for free only.
  localparam logic [5:0] A_TABLE [4] = '{6'b000000, 6'b111110, 6'b111000, 6'b100000};

  initial begin
    int unsigned v, cnt, p;
    bit erd, ewr, a, s;
    for (int t = 0; t < 20000; t++) begin
      // random non-decreasing pointers; bias towards empty and full
      v = 0;
      for (int k = 0; k < NP; k++) begin
        if ($urandom_range(2) == 0) v = v + $urandom_range(DEPTH / 2);
        if (v > DEPTH) v = DEPTH;
        ptr[k] = AW'(v);
      end
      case ($urandom_range(5))
        0: ptr = '0;
        1: ptr[NP-1] = AW'(DEPTH);
        default: ;
      endcase
      r_ext   = 1'($urandom_range(1));
      w_ext   = 1'($urandom_range(1));
      rpq_ext = 1'($urandom_range(1));
      prio    = PW'($urandom_range(NPRIO));
      #1;
      cnt = 32'(ptr[NP-1]);
      p   = 32'(prio);
      erd = r_ext && cnt != 0;
      ewr = w_ext && p >= 1 && p <= NPRIO && (cnt != DEPTH || erd);
      check(count == AW'(cnt), "count");
      check(empty == (cnt == 0), "empty");
      check(full == (cnt == DEPTH), "full");
      check(rd_int == erd, "rd_int");
      check(wr_int == ewr, "wr_int");
      check(rpq1 == rpq_ext && rpq2 == rpq_ext, "rpq");
      if (p >= 1 && p <= NPRIO) check(waddr == ptr[2 * p - 1], "waddr");
      for (int k = 0; k < NP; k++) begin
        a = ewr && A_TABLE[p][k];
        s = erd && ptr[k] != 0;
        check(add[k] == (a && !s), $sformatf("add[%0d]", k));
        check(sub[k] == (s && !a), $sformatf("sub[%0d]", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
