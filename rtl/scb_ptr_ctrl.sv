// scb_ptr_ctrl: priority pointer controller of the self-compacting buffer.
//
// Takes the external requests of a cycle (r_ext, w_ext, the priority prio of the
// written data, rpq_ext) and the current pointers, and produces:
//   * the internal read and write: a read is dropped when the buffer is empty; a
//     write is dropped when the buffer is full unless a read is served in the same
//     cycle, and also when prio is outside 1..n;
//   * the A lines (a write of priority p raises A for every pointer after queue p:
//     p+, p+1, ..., free) and the S lines (a read raises S for every pointer);
//   * the case selector: a pointer with A only adds 1, with S only subtracts 1,
//     with both holds;
//   * the insertion address waddr = pointer p+ (the free pointer for p = n), read
//     before this cycle's update;
//   * rpq1/rpq2, the two rotation steps, from the external RPQ+ signal.
// The table of A/S lines, the case selector, the address source and the full/empty
// gating follow the original description. This design adds one rule: S is ignored
// for a pointer that is 0, because such a region lies wholly before the row being
// read (without it, a read would wrap the pointer of an empty region, and a write
// into an empty region ahead of the head with a read in the same cycle would leave
// the following pointers one row short). Purely combinational.
module scb_ptr_ctrl
  import scb_pkg::*;
#(
  parameter int unsigned NPRIO = SCB_NPRIO,
  parameter int unsigned DEPTH = SCB_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH + 1),
  parameter int unsigned PW    = $clog2(NPRIO + 1),
  localparam int unsigned NP   = 2 * NPRIO
) (
  input  logic                  r_ext,
  input  logic                  w_ext,
  input  logic [PW-1:0]         prio,
  input  logic                  rpq_ext,
  input  logic [NP-1:0][AW-1:0] ptr,
  output logic [NP-1:0]         add,
  output logic [NP-1:0]         sub,
  output logic                  rpq1,
  output logic                  rpq2,
  output logic                  rd_int,
  output logic                  wr_int,
  output logic [AW-1:0]         waddr,
  output logic                  full,
  output logic                  empty,
  output logic [AW-1:0]         count
);

  logic          prio_ok;
  logic [NP-1:0] a_line;
  logic [NP-1:0] s_line;

  assign count   = ptr[NP-1];
  assign empty   = (count == '0);
  assign full    = (count == AW'(DEPTH));

  assign rd_int  = r_ext && !empty;
  assign wr_int  = w_ext && prio_ok && (!full || rd_int);

  // priority check and insertion address: pointer p+ of the written priority
  always_comb begin
    prio_ok = 1'b0;
    waddr   = '0;
    for (int unsigned p = 1; p <= NPRIO; p++) begin
      if (32'(prio) == p) begin
        prio_ok = 1'b1;
        waddr   = ptr[ptr_of_plus(p)];
      end
    end
  end

  // Lines of the write/read tables, then the case selector.
  always_comb begin
    for (int unsigned k = 0; k < NP; k++) begin
      a_line[k] = wr_int && (k + 1 >= 2 * 32'(prio));
      s_line[k] = rd_int && (ptr[k] != '0);
      add[k]    = a_line[k] && !s_line[k];
      sub[k]    = s_line[k] && !a_line[k];
    end
  end

  assign rpq1 = rpq_ext;
  assign rpq2 = rpq_ext;

endmodule
