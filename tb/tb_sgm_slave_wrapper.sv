// Testbench for sgm_slave_wrapper: three master slots in front of a
// behavioural memory slave with two wait cycles per transaction.
//
// A cycle-level reference model kept in the testbench predicts, every cycle,
// which slot is granted (request filter closed during wait cycles, highest
// dynamic level first, then slot 0 > slot 1 > slot 2), the slot's dynamic
// level update, the data-phase owner whose SGWDATA reaches the slave, and
// the SGSADDR/SGSSIZE/SGSNOOP broadcast. Phase 1 drives random requests;
// phase 2 keeps all three masters requesting and checks that grants rotate
// (round-robin behaviour) and that a round happens every WAIT+1 cycles.
module tb_sgm_slave_wrapper;
  localparam int N = 3;
  localparam int D = 4;
  localparam int WAIT = 2;

  logic        clk = 0, rst_n = 0;
  logic        m_req   [N];
  logic [31:0] m_addr  [N];
  logic [2:0]  m_size  [N];
  logic        m_wnr   [N];
  logic [31:0] m_wdata [N];
  logic        m_grant [N];
  logic [31:0] b_rdata, b_saddr;
  logic        b_wait, b_error, b_snoop;
  logic [2:0]  b_ssize;
  logic        s_activate, s_wnr, s_wait, s_error, s_snoop;
  logic [31:0] s_addr, s_wdata, s_rdata;
  logic [2:0]  s_size;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sgm_slave_wrapper #(.NUM_SLOTS(N), .DYN_LEVELS(D), .ADDR_W(32), .DATA_W(32)) dut (
    .clk, .rst_n, .m_req, .m_addr, .m_size, .m_wnr, .m_wdata, .m_grant,
    .b_rdata, .b_wait, .b_error, .b_snoop, .b_saddr, .b_ssize,
    .s_activate, .s_addr, .s_size, .s_wnr, .s_wdata, .s_rdata, .s_wait, .s_error, .s_snoop);

  sgm_mem_slave_model #(.WAIT(WAIT), .SNOOP(1'b1)) u_mem (
    .clk, .rst_n, .activate(s_activate), .addr(s_addr), .size(s_size), .wnr(s_wnr),
    .wdata(s_wdata), .rdata(s_rdata), .wait_o(s_wait), .error_o(s_error), .snoop_o(s_snoop));

  // ---------------------------------------------------------- reference
  bit          r_dp, r_wq;
  int          r_owner;
  int          r_lvl [N];
  logic [31:0] r_saddr;
  logic [2:0]  r_ssize;
  int          wins [N];
  int          rounds;
  bit          check_en = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  always @(negedge clk) if (check_en) begin
    bit open;
    int win;
    open = !(r_dp && r_wq);
    win = -1;
    for (int i = 0; i < N; i++)
      if (m_req[i] && open && (win < 0 || r_lvl[i] > r_lvl[win])) win = i;
    for (int i = 0; i < N; i++)
      chk(m_grant[i] == (i == win), $sformatf("grant[%0d]=%0b expected winner %0d", i, m_grant[i], win));
    chk(s_activate == (win >= 0), "SGACTIVATE");
    if (win >= 0) begin
      chk(s_addr == m_addr[win] && s_size == m_size[win] && s_wnr == m_wnr[win], "address-phase mux");
      chk(b_snoop == s_snoop, "SGSNOOP broadcast");
    end else
      chk(!b_snoop, "SGSNOOP idle");
    if (r_dp) begin
      chk(s_wdata == m_wdata[r_owner], "data-phase SGWDATA from owner");
      chk(b_saddr == r_saddr && b_ssize == r_ssize, "SGSADDR/SGSSIZE");
    end
    chk(b_wait == s_wait && b_error == s_error && b_rdata == s_rdata, "response broadcast");
    // next state
    for (int i = 0; i < N; i++)
      if (i == win) r_lvl[i] = 0;
      else if (m_req[i] && open && r_lvl[i] < D - 1) r_lvl[i]++;
    if (win >= 0) begin
      r_dp = 1; r_wq = s_wait; r_owner = win; r_saddr = m_addr[win]; r_ssize = m_size[win];
      wins[win]++; rounds++;
    end else if (r_dp && r_wq) r_wq = s_wait;
    else begin r_dp = 0; r_wq = 0; end
  end

  task automatic drive_random();
    for (int i = 0; i < N; i++) begin
      m_req[i]   = ($urandom_range(3, 0) != 0);
      m_addr[i]  = {4'h2, 16'h0, 10'($urandom_range(1023, 0)), 2'b00};
      m_size[i]  = 3'($urandom_range(2, 0));
      m_wnr[i]   = $urandom_range(1, 0) == 1;
      m_wdata[i] = $urandom;
    end
  endtask

  initial begin
    int c0;
    for (int i = 0; i < N; i++) begin
      m_req[i] = 0; m_addr[i] = 0; m_size[i] = 0; m_wnr[i] = 0; m_wdata[i] = 0;
      r_lvl[i] = 0; wins[i] = 0;
    end
    r_dp = 0; r_wq = 0; r_owner = 0; r_saddr = 0; r_ssize = 0; rounds = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check_en = 1;
    // phase 1: random traffic
    repeat (3000) begin
      @(posedge clk); #1 drive_random();
    end
    // phase 2: everyone requests all the time
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      m_req[i] = 1; m_wnr[i] = 0; wins[i] = 0;
    end
    // let the dynamic levels settle into the rotation
    repeat (30) @(posedge clk);
    for (int i = 0; i < N; i++) wins[i] = 0;
    rounds = 0;
    c0 = 0;
    repeat (90 * (WAIT + 1)) @(posedge clk);
    chk(rounds == 90, $sformatf("one round every %0d cycles (%0d rounds)", WAIT + 1, rounds));
    for (int i = 0; i < N; i++)
      chk(wins[i] == 30, $sformatf("round-robin share of slot %0d: %0d of 90", i, wins[i]));
    check_en = 0;
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
