// Configuration testbench for sgm_system: a reduced, irregular system that
// exercises the options the full-size testbench leaves at their defaults.
//   - three masters: 0 and 2 on AHB-Lite ports, 1 on the native SG-Multi port
//     (driven here through an AHB-Lite model and a separate adapter);
//   - five slaves only (slots 5..15 empty);
//   - master 2 not wired to slave 4;
//   - one dynamic priority level, i.e. pure static priority (slot 0 first).
// Checked:
//   1. random traffic from all three masters to the slaves they reach, with
//      read data and error responses checked by the master models;
//   2. static priority: all three masters read different SRAM words (no
//      snooping possible) as fast as they can; master 0 must win every
//      round and finish after 100 transactions of 4 cycles, master 1 after
//      200, master 2 after 300;
//   3. requests that can never be served - master 2 to slave 4, master 0 to
//      the empty slot 9 - must stay ungranted and reach no slave.
module tb_sgm_system_config;
  import sgm_tb_pkg::*;

  localparam int NM = 3;
  localparam int NS = 5;

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // AHB side of every master model
  logic [31:0] a_haddr [NM], a_hwdata [NM], a_hrdata [NM];
  logic [1:0]  a_htrans [NM];
  logic        a_hwrite [NM], a_hready [NM], a_hresp [NM];
  logic [2:0]  a_hsize [NM];

  // system ports
  logic [31:0] haddr  [NM], hwdata [NM], hrdata [NM];
  logic [1:0]  htrans [NM];
  logic        hwrite [NM], hready [NM], hresp [NM], hmastlock [NM];
  logic [2:0]  hsize  [NM], hburst [NM];
  logic [3:0]  hprot  [NM];
  logic        m_req [NM], m_wnr [NM], m_grant [NM], m_wait [NM], m_error [NM];
  logic [31:0] m_addr [NM], m_wdata [NM], m_rdata [NM];
  logic [2:0]  m_size [NM];
  logic        s_activate [NS], s_wnr [NS], s_wait [NS], s_error [NS], s_snoop [NS];
  logic [31:0] s_addr [NS], s_wdata [NS], s_rdata [NS];
  logic [2:0]  s_size [NS];

  int checks = 0, failures = 0;

  localparam logic [NM-1:0][15:0] CONN = '{16'hFFEF, 16'hFFFF, 16'hFFFF};

  sgm_system #(
    .NUM_MASTERS (NM), .NUM_SLAVES (NS), .DYN_LEVELS (1),
    .AHB_MASTERS (3'b101), .CONN (CONN)
  ) dut (
    .sgclk (clk), .sgresetn (rst_n),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hmastlock, .hwdata,
    .hrdata, .hready, .hresp,
    .m_req, .m_addr, .m_size, .m_wnr, .m_wdata, .m_grant, .m_rdata, .m_wait, .m_error,
    .s_activate, .s_addr, .s_size, .s_wnr, .s_wdata, .s_rdata, .s_wait, .s_error, .s_snoop);

  for (genvar m = 0; m < NM; m++) begin : g_m
    sgm_ahb_master_model u_m (
      .clk, .rst_n, .haddr(a_haddr[m]), .htrans(a_htrans[m]), .hwrite(a_hwrite[m]),
      .hsize(a_hsize[m]), .hwdata(a_hwdata[m]), .hrdata(a_hrdata[m]),
      .hready(a_hready[m]), .hresp(a_hresp[m]));
    assign hburst[m]    = 3'b000;
    assign hprot[m]     = 4'b0011;
    assign hmastlock[m] = 1'b0;
    if (m == 1) begin : g_native
      // native port driven through a stand-alone adapter
      sgm_ahb_adapter u_drv (
        .clk, .rst_n, .haddr(a_haddr[m]), .htrans(a_htrans[m]), .hwrite(a_hwrite[m]),
        .hsize(a_hsize[m]), .hburst(3'b000), .hprot(4'b0011), .hmastlock(1'b0),
        .hwdata(a_hwdata[m]), .hrdata(a_hrdata[m]), .hready(a_hready[m]), .hresp(a_hresp[m]),
        .sg_req(m_req[m]), .sg_addr(m_addr[m]), .sg_size(m_size[m]), .sg_wnr(m_wnr[m]),
        .sg_wdata(m_wdata[m]), .sg_grant(m_grant[m]), .sg_rdata(m_rdata[m]),
        .sg_wait(m_wait[m]), .sg_error(m_error[m]));
      assign haddr[m] = '0; assign htrans[m] = 2'b00; assign hwrite[m] = 1'b0;
      assign hsize[m] = '0; assign hwdata[m] = '0;
    end else begin : g_ahb
      assign haddr[m]  = a_haddr[m];
      assign htrans[m] = a_htrans[m];
      assign hwrite[m] = a_hwrite[m];
      assign hsize[m]  = a_hsize[m];
      assign hwdata[m] = a_hwdata[m];
      assign a_hrdata[m] = hrdata[m];
      assign a_hready[m] = hready[m];
      assign a_hresp[m]  = hresp[m];
      assign m_req[m] = 1'b0; assign m_addr[m] = '0; assign m_size[m] = '0;
      assign m_wnr[m] = 1'b0; assign m_wdata[m] = '0;
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    sgm_mem_slave_model #(.WAIT(s == 0 ? 0 : 3), .SNOOP(1'b1), .ERR_BIT(27), .WORDS(512)) u_mem (
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

  task automatic push(input int m, input ahb_op_t op);
    case (m)
      0: g_m[0].u_m.push(op);
      1: g_m[1].u_m.push(op);
      default: g_m[2].u_m.push(op);
    endcase
  endtask

  function automatic bit idle(input int m);
    case (m)
      0: return g_m[0].u_m.idle();
      1: return g_m[1].u_m.idle();
      default: return g_m[2].u_m.idle();
    endcase
  endfunction

  // private words per master (bit 10 = 0, bits 9:8 = master), shared words bit 10 = 1
  logic [31:0] shadow   [NM][NS][256];
  bit          shadow_v [NM][NS][256];

  function automatic ahb_op_t make_op(input int m, input logic [31:0] a, input logic [2:0] sz,
                                      input bit write);
    ahb_op_t op;
    logic [31:0] cur, mask;
    int s, k;
    s = int'(a[31:28]);
    k = int'(a[9:2]);
    cur  = (!a[10] && shadow_v[m][s][k]) ? shadow[m][s][k] : pattern(a);
    mask = lane_mask(a, sz);
    op.addr = a; op.size = sz; op.write = write; op.wdata = $urandom;
    op.check = 1'b1; op.exp = cur; op.exp_err = a[27]; op.gap = 8'd0;
    if (write && !a[27]) begin
      shadow[m][s][k]   = (cur & ~mask) | (op.wdata & mask);
      shadow_v[m][s][k] = 1'b1;
    end
    return op;
  endfunction

  function automatic ahb_op_t rand_op(input int m);
    int s;
    bit shared;
    logic [2:0] sz;
    logic [31:0] a;
    s = $urandom_range(m == 2 ? NS - 2 : NS - 1, 0);
    shared = $urandom_range(1, 0) == 1;
    sz = 3'($urandom_range(2, 0));
    a = {4'(s), 17'h0, shared, shared ? 8'($urandom_range(7, 0)) : {2'(m), 6'($urandom_range(15, 0))}, 2'b00};
    a[1:0] = (sz == 0) ? 2'($urandom) : (sz == 1) ? {1'($urandom), 1'b0} : 2'b00;
    if ($urandom_range(15, 0) == 0) a[27] = 1'b1;
    return make_op(m, a, sz, !shared && $urandom_range(1, 0) == 1);
  endfunction

  // cycle counter and per-master completion time for phase 2
  longint cyc = 0;
  longint t_done [NM];
  always @(posedge clk) cyc++;

  int unsigned act4;
  always @(posedge clk) if (rst_n && s_activate[4] && s_addr[4][9:8] == 2'd2 && !s_addr[4][10])
    act4++;

  initial begin
    longint t0;
    for (int m = 0; m < NM; m++)
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < 256; k++) shadow_v[m][s][k] = 1'b0;
    act4 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // 1. random traffic
    for (int i = 0; i < 300; i++)
      for (int m = 0; m < NM; m++) push(m, rand_op(m));
    do @(posedge clk); while (!(idle(0) && idle(1) && idle(2)));
    repeat (4) @(posedge clk); #1;

    // 2. static priority on the SRAM (slave 2), different words per master
    t0 = cyc;
    for (int m = 0; m < NM; m++) t_done[m] = 0;
    for (int i = 0; i < 100; i++)
      for (int m = 0; m < NM; m++)
        push(m, make_op(m, {4'd2, 17'h0, 1'b0, 2'(m), 6'(i % 64), 2'b00}, 3'b010, 1'b0));
    while (t_done[0] == 0 || t_done[1] == 0 || t_done[2] == 0) begin
      @(posedge clk);
      for (int m = 0; m < NM; m++) if (t_done[m] == 0 && idle(m)) t_done[m] = cyc - t0;
    end
    $display("static priority: masters finish after %0d, %0d, %0d cycles",
             t_done[0], t_done[1], t_done[2]);
    chk(t_done[0] >= 400 && t_done[0] <= 404, "master 0 wins every round");
    chk(t_done[1] >= 800 && t_done[1] <= 804, "master 1 served after master 0");
    chk(t_done[2] >= 1200 && t_done[2] <= 1204, "master 2 served last");
    repeat (4) @(posedge clk); #1;

    // 3. requests that cannot be served
    chk(act4 == 0, "no transaction of master 2 reached slave 4");
    push(2, make_op(2, {4'd4, 17'h0, 1'b0, 2'd2, 6'd1, 2'b00}, 3'b010, 1'b0));
    push(0, make_op(0, {4'd9, 28'h0000_100}, 3'b010, 1'b0));
    repeat (50) @(posedge clk);
    chk(!idle(2) && !hready[2], "master 2 to unwired slave 4: never granted");
    chk(!idle(0) && !hready[0], "master 0 to empty slot 9: never granted");
    chk(act4 == 0, "slave 4 never saw master 2");

    checks += g_m[0].u_m.n_checks + g_m[1].u_m.n_checks + g_m[2].u_m.n_checks;
    failures += g_m[0].u_m.n_fail + g_m[1].u_m.n_fail + g_m[2].u_m.n_fail;
    chk(g_m[0].u_m.n_done + g_m[1].u_m.n_done + g_m[2].u_m.n_done == 1200,
        "all servable transfers completed");
    chk(g_m[0].u_m.n_err_seen + g_m[1].u_m.n_err_seen + g_m[2].u_m.n_err_seen > 0,
        "error responses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
