// tb_scb_top: end-to-end test of the self-compacting buffer at its default size.
//
// Random read/write/priority/rotation traffic in phases that fill, drain and churn
// the buffer. A reference model keeps one FIFO per region (0+, 1, 1+, ..., n) and
// applies, per cycle: the read (first entry of the first non-empty region, dropped
// when empty), then the write (appended to queue p, dropped when full without a
// read or when p is outside 1..n), then the RPQ+ rotation (queues p and p+ appended
// to (p-1)+ for p = 1..n-1). Every cycle it checks the acknowledges, every pointer
// against the region sizes, full/empty/count, and that each read returns the
// model's data exactly two cycles after the request. It counts how often each
// mechanism occurred and fails for any that never did.
module tb_scb_top;
  import scb_pkg::*;

  localparam int unsigned DEPTH = SCB_DEPTH;
  localparam int unsigned WIDTH = SCB_WIDTH;
  localparam int unsigned NPRIO = SCB_NPRIO;
  localparam int unsigned AW    = $clog2(DEPTH + 1);
  localparam int unsigned PW    = $clog2(NPRIO + 1);
  localparam int unsigned NP    = 2 * NPRIO;
  localparam int unsigned NR    = 2 * NPRIO;   // regions 0+, 1, 1+, ..., n
  localparam int unsigned NCYC  = 20000;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  r_ext, w_ext, rpq;
  logic [PW-1:0]         prio;
  logic [WIDTH-1:0]      wdata;
  logic                  w_ack, r_ack, rd_valid, full, empty;
  logic [WIDTH-1:0]      rd_data;
  logic [AW-1:0]         count;
  logic [NP-1:0][AW-1:0] ptr;
  scb_case_e             buf_case;

  scb_top dut (
    .clk, .rst_n, .r_ext, .w_ext, .prio, .wdata, .rpq, .w_ack, .r_ack,
    .rd_valid, .rd_data, .full, .empty, .count, .ptr, .buf_case
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // reference model
  logic [WIDTH-1:0] region [NR][$];
  logic [WIDTH-1:0] exp_data [$];
  int unsigned      exp_due  [$];

  function automatic int unsigned model_count();
    int unsigned n = 0;
    for (int i = 0; i < NR; i++) n += region[i].size();
    return n;
  endfunction

  // mechanism counters
  int unsigned n_write, n_read, n_rdwr, n_full_block, n_empty_block, n_full_rdwr;
  int unsigned n_rot, n_rot_rw, n_bad_prio, n_ahead_of_head, n_full_seen;
  int unsigned n_case_w, n_case_r, n_case_rw;

  always @(posedge clk) begin
    if (rst_n) begin
      case (buf_case)
        SCB_WRITE: n_case_w++;
        SCB_READ:  n_case_r++;
        SCB_RDWR:  n_case_rw++;
        default: ;
      endcase
    end
  end

  int unsigned wprob, rprob;
  logic [WIDTH-1:0] tag = '0;

  initial begin
    rst_n = 1'b0; r_ext = 0; w_ext = 0; rpq = 0; prio = 1; wdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      @(negedge clk);
      // outputs of the previous edges
      if (exp_due.size() > 0 && exp_due[0] == cyc) begin
        check(rd_valid == 1'b1, "rd_valid missing");
        check(rd_data == exp_data[0], $sformatf("rd_data %h expected %h", rd_data, exp_data[0]));
        void'(exp_due.pop_front());
        void'(exp_data.pop_front());
      end else begin
        check(rd_valid == 1'b0, "unexpected rd_valid");
      end
      begin
        int unsigned acc;
        acc = 0;
        for (int k = 0; k < NP; k++) begin
          acc += region[k].size();
          check(ptr[k] == AW'(acc), $sformatf("ptr[%0d]=%0d expected %0d", k, ptr[k], acc));
        end
      end
      check(count == AW'(model_count()), "count");
      check(full == (model_count() == DEPTH), "full");
      check(empty == (model_count() == 0), "empty");

      // traffic phase
      case ((t / 300) % 5)
        0: begin wprob = 90; rprob = 10; end
        1: begin wprob = 10; rprob = 90; end
        2: begin wprob = 60; rprob = 60; end
        3: begin wprob = 97; rprob = 50; end
        default: begin wprob = 40; rprob = 70; end
      endcase
      w_ext = ($urandom_range(99) < wprob);
      r_ext = ($urandom_range(99) < rprob);
      rpq   = ($urandom_range(99) < 4);
      prio  = ($urandom_range(49) == 0) ? '0 : PW'($urandom_range(NPRIO, 1));
      tag   = tag + 1'b1;
      wdata = tag;

      #1;
      begin
        int unsigned cnt, p;
        bit mrd, mwr, prio_ok;
        cnt = model_count();
        p = 32'(prio);
        prio_ok = (p >= 1 && p <= NPRIO);
        mrd = r_ext && cnt > 0;
        mwr = w_ext && prio_ok && (cnt < DEPTH || mrd);
        check(r_ack == mrd, "r_ack");
        check(w_ack == mwr, "w_ack");
        // mechanisms
        if (mwr && !mrd) n_write++;
        if (mrd && !mwr) n_read++;
        if (mrd && mwr)  n_rdwr++;
        if (w_ext && prio_ok && cnt == DEPTH && !mrd) n_full_block++;
        if (w_ext && prio_ok && cnt == DEPTH && mrd)  n_full_rdwr++;
        if (r_ext && cnt == 0) n_empty_block++;
        if (w_ext && !prio_ok) n_bad_prio++;
        if (rpq) n_rot++;
        if (rpq && (mrd || mwr)) n_rot_rw++;
        if (cnt == DEPTH) n_full_seen++;
        // apply to the model: read, then write, then rotation
        if (mrd) begin
          int first;
          first = 0;
          while (region[first].size() == 0) first++;
          if (mwr) begin
            bit ahead;
            ahead = 1'b1;
            for (int i = 0; i < 2 * p; i++) if (region[i].size() != 0) ahead = 1'b0;
            if (ahead) n_ahead_of_head++;
          end
          exp_data.push_back(region[first].pop_front());
          exp_due.push_back(cyc + 2);
        end
        if (mwr) region[2 * p - 1].push_back(wdata);
        if (rpq) begin
          for (int q = 1; q < NPRIO; q++) begin
            while (region[2 * q - 1].size() > 0) region[2 * q - 2].push_back(region[2 * q - 1].pop_front());
            while (region[2 * q].size() > 0)     region[2 * q - 2].push_back(region[2 * q].pop_front());
          end
        end
      end
    end
    // drain the pipeline
    @(negedge clk);
    w_ext = 0; r_ext = 0; rpq = 0;
    repeat (3) begin
      if (exp_due.size() > 0 && exp_due[0] == cyc) begin
        check(rd_valid && rd_data == exp_data[0], "final read");
        void'(exp_due.pop_front());
        void'(exp_data.pop_front());
      end
      @(negedge clk);
    end
    check(exp_due.size() == 0, "reads left over");

    $display("mechanisms: write=%0d read=%0d rdwr=%0d full_block=%0d full_rdwr=%0d empty_block=%0d",
             n_write, n_read, n_rdwr, n_full_block, n_full_rdwr, n_empty_block);
    $display("            rotation=%0d rotation_with_rw=%0d bad_prio=%0d insert_ahead_of_head=%0d full_cycles=%0d",
             n_rot, n_rot_rw, n_bad_prio, n_ahead_of_head, n_full_seen);
    $display("            buffer cases: write=%0d read=%0d rdwr=%0d", n_case_w, n_case_r, n_case_rw);
    check(n_write > 0, "no single write");
    check(n_read > 0, "no single read");
    check(n_rdwr > 0, "no simultaneous read/write");
    check(n_full_block > 0, "no write blocked by full");
    check(n_full_rdwr > 0, "no read/write while full");
    check(n_empty_block > 0, "no read blocked by empty");
    check(n_rot > 0, "no rotation");
    check(n_rot_rw > 0, "no rotation with read/write");
    check(n_ahead_of_head > 0, "no insertion ahead of the head with a read");
    check(n_case_w == n_write && n_case_r == n_read && n_case_rw == n_rdwr, "buffer cases differ from requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
