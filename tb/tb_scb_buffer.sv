// tb_scb_buffer: random test of the buffer array. Each cycle every row gets a
// random action (hold, write, move down, move up; at most one) and a random write
// bus value; a model array applies the same actions. All rows are compared through
// the read port: every few cycles the test reads the whole buffer out by shifting
// it up DEPTH times and compares each word, with rd_valid one cycle after rd_out.
module tb_scb_buffer;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned WIDTH = 12;

  logic             clk = 1'b0, rst_n;
  logic [DEPTH-1:0] wr_line, dn_line, up_line;
  logic             rd_out;
  logic [WIDTH-1:0] wbus, rd_data;
  logic             rd_valid;

  scb_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk, .rst_n, .wr_line, .dn_line, .up_line, .rd_out, .wbus, .rd_valid, .rd_data
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] nxt   [DEPTH];
  logic [WIDTH-1:0] exp_rd;
  bit               exp_v;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    // apply the model for the values now on the inputs, then clock
    for (int r = 0; r < DEPTH; r++) begin
      nxt[r] = model[r];
      if (wr_line[r])      nxt[r] = wbus;
      else if (dn_line[r]) nxt[r] = (r == 0) ? '0 : model[r-1];
      else if (up_line[r]) nxt[r] = (r == DEPTH - 1) ? '0 : model[r+1];
    end
    exp_v  = rd_out;
    exp_rd = model[0];
    @(posedge clk);
    for (int r = 0; r < DEPTH; r++) model[r] = nxt[r];
    @(negedge clk);
    checks++;
    if (rd_valid != exp_v || (exp_v && rd_data != exp_rd)) begin
      failures++;
      $display("FAIL rd_valid=%0b rd_data=%h expected %0b %h", rd_valid, rd_data, exp_v, exp_rd);
    end
  endtask

  initial begin
    rst_n = 0; wr_line = '0; dn_line = '0; up_line = '0; rd_out = 0; wbus = '0;
    for (int r = 0; r < DEPTH; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      for (int k = 0; k < 10; k++) begin
        wr_line = '0; dn_line = '0; up_line = '0;
        for (int r = 0; r < DEPTH; r++) begin
          case ($urandom_range(3))
            1: wr_line[r] = 1'b1;
            2: dn_line[r] = 1'b1;
            3: up_line[r] = 1'b1;
            default: ;
          endcase
        end
        rd_out = 1'($urandom_range(1));
        wbus   = WIDTH'($urandom);
        step();
      end
      // read the whole buffer out
      wr_line = '0; dn_line = '0; up_line = '1; rd_out = 1'b1;
      for (int r = 0; r < DEPTH; r++) step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
