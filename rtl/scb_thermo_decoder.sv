// scb_thermo_decoder: thermometer address decoder of the buffer controller.
//
// Unlike a one-hot decoder, it sets the addressed line and every line below it
// (higher row numbers): line[r] = en && (r >= addr). An address of N or more sets no
// line. The buffer controller uses these lines as the "down" lines of a single write
// and, inverted, as the "up" lines of a simultaneous read/write. Purely
// combinational. The behaviour follows the original description; the enable input
// is this design's choice.
module scb_thermo_decoder #(
  parameter int unsigned N  = 16,              // number of lines (buffer rows)
  parameter int unsigned AW = $clog2(N + 1)    // address width, holds 0..N
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  line
);

  always_comb begin
    for (int unsigned r = 0; r < N; r++) begin
      line[r] = en && (AW'(r) >= addr);
    end
  end

endmodule
