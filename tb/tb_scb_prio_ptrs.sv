// tb_scb_prio_ptrs: random test of the priority pointer set. Each cycle every
// pointer gets a random add, sub or hold, and the rotation is requested at random;
// the model first applies the add/sub, then the concatenation (p+ takes p+1's
// value) and then the promotion (p takes the new p+), for p = 1..n-1, and compares
// all pointers after the edge. Resets occur at random.
module tb_scb_prio_ptrs;
  localparam int unsigned NPRIO = 4;
  localparam int unsigned DEPTH = 20;
  localparam int unsigned AW    = $clog2(DEPTH + 1);
  localparam int unsigned NP    = 2 * NPRIO;

  logic                  clk = 1'b0, rst_n;
  logic [NP-1:0]         add, sub;
  logic                  rpq1, rpq2;
  logic [NP-1:0][AW-1:0] ptr;

  scb_prio_ptrs #(.NPRIO(NPRIO), .DEPTH(DEPTH), .AW(AW)) dut (.clk, .rst_n, .add, .sub, .rpq1, .rpq2, .ptr);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, rotations = 0;
  int unsigned model [NP];
  int unsigned m     [NP];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; add = '0; sub = '0; rpq1 = 0; rpq2 = 0;
    for (int k = 0; k < NP; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      for (int k = 0; k < NP; k++) begin
        case ($urandom_range(2))
          0: begin add[k] = 1; sub[k] = 0; end
          1: begin add[k] = 0; sub[k] = 1; end
          default: begin add[k] = 0; sub[k] = 0; end
        endcase
      end
      rpq1 = ($urandom_range(4) == 0);
      rpq2 = rpq1;
      if (rpq1) rotations++;
      for (int k = 0; k < NP; k++)
        m[k] = add[k] ? (model[k] + 1) % (1 << AW) : sub[k] ? (model[k] + (1 << AW) - 1) % (1 << AW) : model[k];
      if (rpq1) begin
        for (int p = 1; p < NPRIO; p++) m[2 * p - 1] = m[2 * p];      // concatenation
        for (int p = 1; p < NPRIO; p++) m[2 * p - 2] = m[2 * p - 1];  // promotion
      end
      if ($urandom_range(299) == 0) begin
        rst_n = 0;
        add = '0; sub = '0; rpq1 = 0; rpq2 = 0;  // no operation on the following edge
        #1;
        rst_n = 1;
        for (int k = 0; k < NP; k++) model[k] = 0;
      end else begin
        @(posedge clk);
        for (int k = 0; k < NP; k++) model[k] = m[k];
      end
      @(negedge clk);
      for (int k = 0; k < NP; k++) begin
        checks++;
        if (ptr[k] != AW'(model[k])) begin
          failures++;
          if (failures < 20) $display("FAIL t=%0d ptr[%0d]=%0d expected %0d", t, k, ptr[k], model[k]);
        end
      end
    end
    checks++;
    if (rotations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
