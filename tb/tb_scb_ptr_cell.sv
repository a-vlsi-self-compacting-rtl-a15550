// tb_scb_ptr_cell: random test of one priority pointer. Random add, sub (never
// both), load with a random value, and occasional resets; the stored address is
// compared every cycle with an integer model (modulo 2^AW), and nxt_rw/nxt are
// checked before each edge.
module tb_scb_ptr_cell;
  localparam int unsigned AW = 5;

  logic          clk = 1'b0, rst_n;
  logic          add, sub, load;
  logic [AW-1:0] load_val, q, nxt_rw, nxt;

  scb_ptr_cell #(.AW(AW)) dut (.clk, .rst_n, .add, .sub, .load, .load_val, .q, .nxt_rw, .nxt);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned model, m_rw;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: q=%0d model=%0d", what, q, model);
    end
  endtask

  initial begin
    rst_n = 0; add = 0; sub = 0; load = 0; load_val = '0; model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      case ($urandom_range(2))
        0: begin add = 1; sub = 0; end
        1: begin add = 0; sub = 1; end
        default: begin add = 0; sub = 0; end
      endcase
      load     = ($urandom_range(9) == 0);
      load_val = AW'($urandom);
      #1;
      m_rw = add ? (model + 1) % (1 << AW) : sub ? (model + (1 << AW) - 1) % (1 << AW) : model;
      check(nxt_rw == AW'(m_rw), "nxt_rw");
      check(nxt == (load ? load_val : AW'(m_rw)), "nxt");
      if ($urandom_range(199) == 0) begin
        rst_n = 0;
        add = 0; sub = 0; load = 0;  // no operation on the following edge
        #1;
        model = 0;
        check(q == '0, "reset");
        rst_n = 1;
      end else begin
        @(posedge clk);
        model = load ? int'(load_val) : m_rw;
      end
      @(negedge clk);
      check(q == AW'(model), "q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
