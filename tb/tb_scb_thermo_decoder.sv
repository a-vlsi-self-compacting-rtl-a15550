// tb_scb_thermo_decoder: exhaustive test of the thermometer decoder. For every
// address (including those past the last line) and both enable values, each line
// must be set exactly when enabled and its row number is at or past the address.
module tb_scb_thermo_decoder;
  localparam int unsigned N  = 16;
  localparam int unsigned AW = $clog2(N + 1);

  logic          en;
  logic [AW-1:0] addr;
  logic [N-1:0]  line;

  scb_thermo_decoder #(.N(N), .AW(AW)) dut (.en, .addr, .line);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < (1 << AW); a++) begin
        en = e[0];
        addr = AW'(a);
        #1;
        for (int r = 0; r < N; r++) begin
          checks++;
          if (line[r] !== (e == 1 && r >= a)) begin
            failures++;
            $display("FAIL en=%0d addr=%0d line[%0d]=%b", e, a, r, line[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
