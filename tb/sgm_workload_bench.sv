// One SG-Multi system with N AHB-Lite masters, used by tb_sgm_workloads to
// time the two benchmark programs: every master reads 100 32-bit words from
// memory, back to back, all masters starting in the same cycle.
//   SHARED = 1: all masters read the same 100 words of the SRAM (slave 2,
//               four cycles per transaction) - interfering transactions;
//   SHARED = 0: master m reads 100 words of its own slave 4+m, built like
//               the SRAM - non-interfering transactions.
// Raising go starts the run; done rises once every master has finished, and
// cycles then holds the number of clock cycles from the first address phase
// to the last completed transfer. fails counts wrong read data or error
// responses seen by the master models. Slaves that the program does not use
// are memory models as well.
module sgm_workload_bench #(
  parameter int unsigned N        = 1,
  parameter bit          SNOOP    = 1'b1,
  parameter bit          SHARED   = 1'b1,
  parameter bit          BYPASS   = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  output logic        done,
  output int unsigned cycles,
  output int unsigned fails,
  output int unsigned slave_txns
);
  import sgm_tb_pkg::*;

  localparam int NS = 16;

  logic [31:0] haddr  [N];
  logic [1:0]  htrans [N];
  logic        hwrite [N];
  logic [2:0]  hsize  [N];
  logic [2:0]  hburst [N];
  logic [3:0]  hprot  [N];
  logic        hmastlock [N];
  logic [31:0] hwdata [N];
  logic [31:0] hrdata [N];
  logic        hready [N];
  logic        hresp  [N];
  logic        m_req   [N];
  logic [31:0] m_addr  [N];
  logic [2:0]  m_size  [N];
  logic        m_wnr   [N];
  logic [31:0] m_wdata [N];
  logic        m_grant [N];
  logic [31:0] m_rdata [N];
  logic        m_wait  [N];
  logic        m_error [N];
  logic        s_activate [NS];
  logic [31:0] s_addr     [NS];
  logic [2:0]  s_size     [NS];
  logic        s_wnr      [NS];
  logic [31:0] s_wdata    [NS];
  logic [31:0] s_rdata    [NS];
  logic        s_wait     [NS];
  logic        s_error    [NS];
  logic        s_snoop    [NS];

  logic        idle_m [N];
  int unsigned fail_m [N];

  sgm_system #(.NUM_MASTERS(N), .SNOOP_EN(SNOOP), .ARB_BYPASS(BYPASS)) u_sys (
    .sgclk (clk), .sgresetn (rst_n),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hmastlock, .hwdata,
    .hrdata, .hready, .hresp,
    .m_req, .m_addr, .m_size, .m_wnr, .m_wdata, .m_grant, .m_rdata, .m_wait, .m_error,
    .s_activate, .s_addr, .s_size, .s_wnr, .s_wdata, .s_rdata, .s_wait, .s_error, .s_snoop);

  for (genvar m = 0; m < N; m++) begin : g_m
    logic pushed;
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

    always @(posedge clk) begin
      if (!rst_n) pushed <= 1'b0;
      else if (go && !pushed) begin
        for (int i = 0; i < 100; i++) begin
          ahb_op_t op;
          op.addr    = {SHARED ? 4'h2 : 4'(4 + m), 18'h0, 8'(i), 2'b00};
          op.size    = 3'b010;
          op.write   = 1'b0;
          op.wdata   = '0;
          op.check   = 1'b1;
          op.exp     = pattern(op.addr);
          op.exp_err = 1'b0;
          op.gap     = 8'd0;
          u_m.push(op);
        end
        pushed <= 1'b1;
      end
    end
    assign idle_m[m] = pushed && u_m.idle();
    assign fail_m[m] = u_m.n_fail;
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    sgm_mem_slave_model #(.WAIT(3), .SNOOP(1'b1), .ERR_BIT(27), .WORDS(256)) u_mem (
      .clk, .rst_n, .activate(s_activate[s]), .addr(s_addr[s]), .size(s_size[s]),
      .wnr(s_wnr[s]), .wdata(s_wdata[s]), .rdata(s_rdata[s]), .wait_o(s_wait[s]),
      .error_o(s_error[s]), .snoop_o(s_snoop[s]));
  end

  always_comb begin
    done  = 1'b1;
    fails = 0;
    for (int m = 0; m < N; m++) begin
      done  = done && idle_m[m];
      fails = fails + fail_m[m];
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cycles     <= 0;
      slave_txns <= 0;
    end else if (go && !done) begin
      int unsigned act;
      act = 0;
      for (int s = 0; s < NS; s++)
        if (s_activate[s]) act++;
      cycles     <= cycles + 1;
      slave_txns <= slave_txns + act;
    end
  end

endmodule
