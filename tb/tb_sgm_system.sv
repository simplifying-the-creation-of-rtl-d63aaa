// End-to-end testbench for sgm_system at its default (full) size: four
// AHB-Lite masters and sixteen slave ports, no parameter overrides.
//
// Each master port is driven by an AHB-Lite master model (standing in for a
// Cortex-M0 data port); each slave port by a memory model. Slave 2 plays the
// SRAM (three wait cycles, i.e. four cycles per 32-bit transaction), slave 0
// answers without wait cycles, slave 1 with one, slave 3 with two, every
// other slave with three. Any address with bit 27 set is answered with
// SGERROR (at once by slave 0, after the wait cycles by the others).
//
// Memory words are split per slave into a shared half (bit 10 = 1, read only,
// contents from sgm_tb_pkg::pattern) and four private quarters (bit 10 = 0,
// bits 9:8 = master number) that only their master writes, so every read
// has a known expected value. The AHB models check every read and every
// error response.
//
// Phases:
//   1. random traffic from all four masters to all slaves, with sizes of
//      8/16/32 bits, writes, reads, errors and idle gaps;
//   2. one master reads 100 SRAM words in a row (reference time);
//   3. all four masters read the same 100 SRAM words in lockstep: with bus
//      snooping the time must stay that of one master;
//   4. each master reads 100 words from its own slave: the transactions
//      run side by side and the time must stay that of one master.
//
// Counters observed at the ports prove that every mechanism happened:
// address phases of several masters to one slave in the same cycle
// (arbitration with contention), requests not accepted by a slave in their
// first cycle (lost arbitration), reads completed without a slave
// transaction (successful snoops = AHB transfers - slave transactions),
// lost reads that were not snooped, wait cycles, error responses, cycles
// with several slaves active at once.
module tb_sgm_system;
  import sgm_tb_pkg::*;

  localparam int NM = 4;
  localparam int NS = 16;

  logic        clk = 0, rst_n = 0;

  logic [31:0] haddr  [NM];
  logic [1:0]  htrans [NM];
  logic        hwrite [NM];
  logic [2:0]  hsize  [NM];
  logic [2:0]  hburst [NM];
  logic [3:0]  hprot  [NM];
  logic        hmastlock [NM];
  logic [31:0] hwdata [NM];
  logic [31:0] hrdata [NM];
  logic        hready [NM];
  logic        hresp  [NM];

  logic        m_req   [NM];
  logic [31:0] m_addr  [NM];
  logic [2:0]  m_size  [NM];
  logic        m_wnr   [NM];
  logic [31:0] m_wdata [NM];
  logic        m_grant [NM];
  logic [31:0] m_rdata [NM];
  logic        m_wait  [NM];
  logic        m_error [NM];

  logic        s_activate [NS];
  logic [31:0] s_addr     [NS];
  logic [2:0]  s_size     [NS];
  logic        s_wnr      [NS];
  logic [31:0] s_wdata    [NS];
  logic [31:0] s_rdata    [NS];
  logic        s_wait     [NS];
  logic        s_error    [NS];
  logic        s_snoop    [NS];

  int checks = 0, failures = 0;
  longint cyc;
  int unsigned n_contention, n_lost, n_activate, n_ahb_accept, n_waitcyc, n_multi_active;

  always #5 clk = ~clk;

  sgm_system dut (
    .sgclk (clk), .sgresetn (rst_n),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hmastlock, .hwdata,
    .hrdata, .hready, .hresp,
    .m_req, .m_addr, .m_size, .m_wnr, .m_wdata, .m_grant, .m_rdata, .m_wait, .m_error,
    .s_activate, .s_addr, .s_size, .s_wnr, .s_wdata, .s_rdata, .s_wait, .s_error, .s_snoop);

  for (genvar m = 0; m < NM; m++) begin : g_m
    sgm_ahb_master_model u_m (
      .clk, .rst_n, .haddr(haddr[m]), .htrans(htrans[m]), .hwrite(hwrite[m]),
      .hsize(hsize[m]), .hwdata(hwdata[m]), .hrdata(hrdata[m]), .hready(hready[m]),
      .hresp(hresp[m]));
    assign hburst[m]    = 3'b000;
    assign hprot[m]     = 4'b0011;
    assign hmastlock[m] = 1'b0;
    assign m_req[m]     = 1'b0;
    assign m_addr[m]    = '0;
    assign m_size[m]    = '0;
    assign m_wnr[m]     = 1'b0;
    assign m_wdata[m]   = '0;
  end

  function automatic int unsigned wait_of(input int s);
    case (s)
      0: return 0;
      1: return 1;
      3: return 2;
      default: return 3;
    endcase
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g_s
    sgm_mem_slave_model #(.WAIT(wait_of(s)), .SNOOP(1'b1), .ERR_BIT(27), .WORDS(512)) u_mem (
      .clk, .rst_n, .activate(s_activate[s]), .addr(s_addr[s]), .size(s_size[s]),
      .wnr(s_wnr[s]), .wdata(s_wdata[s]), .rdata(s_rdata[s]), .wait_o(s_wait[s]),
      .error_o(s_error[s]), .snoop_o(s_snoop[s]));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------ master model access
  // (generate instances can only be named with constant indices)
  task automatic push(input int m, input ahb_op_t op);
    case (m)
      0: g_m[0].u_m.push(op);
      1: g_m[1].u_m.push(op);
      2: g_m[2].u_m.push(op);
      default: g_m[3].u_m.push(op);
    endcase
  endtask

  function automatic bit all_idle();
    return g_m[0].u_m.idle() && g_m[1].u_m.idle() && g_m[2].u_m.idle() && g_m[3].u_m.idle();
  endfunction

  task automatic run_until_idle(output longint cycles);
    longint c0;
    c0 = cyc;
    do @(posedge clk); while (!all_idle());
    cycles = cyc - c0;
  endtask

  // ------------------------------------------------------- port counters

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; n_contention = 0; n_lost = 0; n_activate = 0; n_ahb_accept = 0;
      n_waitcyc = 0; n_multi_active = 0;
    end else begin
      int act;
      cyc++;
      act = 0;
      for (int s = 0; s < NS; s++) begin
        int nreq;
        if (s_activate[s]) begin
          act++;
          n_activate++;
        end else if (s_wait[s]) n_waitcyc++;
        nreq = 0;
        for (int m = 0; m < NM; m++)
          if (hready[m] && htrans[m][1] && haddr[m][31:28] == 4'(s)) nreq++;
        if (nreq > 1) n_contention++;
      end
      if (act > 1) n_multi_active++;
      for (int m = 0; m < NM; m++)
        if (hready[m] && htrans[m][1]) begin
          int s;
          bit taken;
          n_ahb_accept++;
          s = int'(haddr[m][31:28]);
          taken = s_activate[s] && s_addr[s] == haddr[m] && s_wnr[s] == hwrite[m];
          if (!taken) n_lost++;
        end
    end
  end

  // --------------------------------------------------------- op builders
  logic [31:0] shadow [NM][NS][256];   // private words of each master
  bit          shadow_v [NM][NS][256];

  function automatic logic [31:0] word_addr(input int s, input bit shared, input int m,
                                            input int w);
    return {4'(s), 17'h0, shared, shared ? 8'(w) : {2'(m), 6'(w)}, 2'b00};
  endfunction

  function automatic ahb_op_t make_op(input int m, input logic [31:0] a, input logic [2:0] sz,
                                      input bit write, input logic [7:0] gap);
    ahb_op_t op;
    logic [31:0] cur, mask;
    int s, k;
    s = int'(a[31:28]);
    k = int'(a[9:2]);
    cur = (!a[10] && shadow_v[m][s][k]) ? shadow[m][s][k] : pattern(a);
    mask = lane_mask(a, sz);
    op.addr    = a;
    op.size    = sz;
    op.write   = write;
    op.wdata   = $urandom;
    op.check   = 1'b1;
    op.exp     = cur;
    op.exp_err = a[27];
    op.gap     = gap;
    if (write && !a[27]) begin
      shadow[m][s][k]   = (cur & ~mask) | (op.wdata & mask);
      shadow_v[m][s][k] = 1'b1;
    end
    return op;
  endfunction

  function automatic ahb_op_t rand_op(input int m);
    int s;
    bit shared, write;
    logic [2:0] sz;
    logic [31:0] a;
    case ($urandom_range(7, 0))
      0, 1, 2: s = 2;
      3:       s = 0;
      4:       s = 1;
      5:       s = 3;
      default: s = $urandom_range(NS - 1, 0);
    endcase
    shared = $urandom_range(1, 0) == 1;
    write  = !shared && $urandom_range(1, 0) == 1;
    sz = 3'($urandom_range(2, 0));
    a = word_addr(s, shared, m, shared ? $urandom_range(7, 0) : $urandom_range(15, 0));
    a[1:0] = (sz == 0) ? 2'($urandom) : (sz == 1) ? {1'($urandom), 1'b0} : 2'b00;
    if ($urandom_range(15, 0) == 0) a[27] = 1'b1;
    return make_op(m, a, sz, write, 8'($urandom_range(3, 0) == 0 ? $urandom_range(3, 1) : 0));
  endfunction

  // ----------------------------------------------------------- main
  initial begin
    longint t_one, t_lock, t_sep;
    int unsigned done0, act0, acc0, lost0, multi0;
    int unsigned n_done, n_err, n_chk, n_fail;

    for (int m = 0; m < NM; m++)
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < 256; k++) shadow_v[m][s][k] = 1'b0;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // Phase 1: random traffic.
    for (int i = 0; i < 500; i++)
      for (int m = 0; m < NM; m++) push(m, rand_op(m));
    run_until_idle(t_one);
    $display("phase 1: 2000 random transfers in %0d cycles", t_one);

    // Phase 2: one master, 100 SRAM reads.
    repeat (4) @(posedge clk); #1;
    for (int i = 0; i < 100; i++)
      push(0, make_op(0, word_addr(2, 1, 0, i), 3'b010, 1'b0, 8'd0));
    run_until_idle(t_one);

    // Phase 3: four masters, the same 100 SRAM reads in lockstep.
    repeat (4) @(posedge clk); #1;
    done0 = total_done();
    act0  = n_activate;
    for (int i = 0; i < 100; i++)
      for (int m = 0; m < NM; m++)
        push(m, make_op(m, word_addr(2, 1, m, i), 3'b010, 1'b0, 8'd0));
    run_until_idle(t_lock);
    $display("100 SRAM reads: one master %0d cycles, four masters in lockstep %0d cycles, %0d SRAM transactions for %0d reads",
             t_one, t_lock, n_activate - act0, total_done() - done0);
    chk(t_lock <= t_one + 2, "lockstep reads with snooping take the time of one master");

    // Phase 4: four masters, 100 reads each from their own slave.
    repeat (4) @(posedge clk); #1;
    multi0 = n_multi_active;
    for (int i = 0; i < 100; i++)
      for (int m = 0; m < NM; m++)
        push(m, make_op(m, word_addr(8 + m, 1, m, i), 3'b010, 1'b0, 8'd0));
    run_until_idle(t_sep);
    $display("100 reads per master from separate slaves: %0d cycles", t_sep);
    chk(t_sep <= t_one + 2, "non-interfering transfers proceed in parallel");
    chk(n_multi_active - multi0 >= 90, "address phases at several slaves in the same cycle");

    repeat (5) @(posedge clk);

    // ------------------------------------------------------ final tallies
    n_done = 0; n_err = 0; n_chk = 0; n_fail = 0;
    n_done = total_done();
    n_err  = g_m[0].u_m.n_err_seen + g_m[1].u_m.n_err_seen + g_m[2].u_m.n_err_seen +
             g_m[3].u_m.n_err_seen;
    n_chk  = g_m[0].u_m.n_checks + g_m[1].u_m.n_checks + g_m[2].u_m.n_checks +
             g_m[3].u_m.n_checks;
    n_fail = g_m[0].u_m.n_fail + g_m[1].u_m.n_fail + g_m[2].u_m.n_fail + g_m[3].u_m.n_fail;
    acc0  = n_ahb_accept;
    lost0 = n_lost;
    $display("transfers %0d, slave transactions %0d, snooped %0d, lost in first cycle %0d",
             n_done, n_activate, n_done - n_activate, n_lost);
    $display("contention %0d, wait cycles %0d, errors %0d, multi-slave cycles %0d",
             n_contention, n_waitcyc, n_err, n_multi_active);
    chk(n_done == 2000 + 100 + 400 + 400, $sformatf("all transfers completed (%0d)", n_done));
    chk(acc0 == n_done, "every AHB address phase completed");
    chk(n_contention > 0, "arbitration with contention happened");
    chk(lost0 > n_done - n_activate, "lost arbitration without snooping happened");
    chk(n_done - n_activate >= 300, "successful snoops happened");
    chk(n_waitcyc > 0, "wait cycles happened");
    chk(n_err > 0, "error responses happened");
    checks   += n_chk;
    failures += n_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned total_done();
    return g_m[0].u_m.n_done + g_m[1].u_m.n_done + g_m[2].u_m.n_done + g_m[3].u_m.n_done;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
