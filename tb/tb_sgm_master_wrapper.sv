// Testbench for sgm_master_wrapper. The testbench plays all 16 slave
// wrappers directly, cycle by cycle, and checks the wrapper's decisions:
//   routing   - SGREQ decoded to the slot of the top four address bits, other
//               signals broadcast, responses taken from the addressed slot in
//               the address phase and from the data-phase slot afterwards,
//               an address phase and a data phase with different slaves in
//               the same cycle, a disabled slot never granted;
//   snooping  - lost snoopable read -> compare -> wait -> grant in the cycle
//               before the snooped transaction's last cycle, read data
//               forwarded; a direct s1->s3 case; back-to-back s3->s1; no
//               snoop for a larger size, a different address, a write, or
//               after SGERROR.
// Each slave slot k returns SGRDATA = 0xD000_000k so the mux is visible.
module tb_sgm_master_wrapper;
  import sgm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        d_req, d_wnr, d_grant, d_wait, d_error;
  logic [31:0] d_addr, d_wdata, d_rdata;
  logic [2:0]  d_size;
  logic        s_req   [NUM_SLOTS];
  logic [31:0] s_addr, s_wdata;
  logic [2:0]  s_size;
  logic        s_wnr;
  logic        s_grant [NUM_SLOTS];
  logic [31:0] s_rdata [NUM_SLOTS];
  logic        s_wait  [NUM_SLOTS];
  logic        s_error [NUM_SLOTS];
  logic        s_snoop [NUM_SLOTS];
  logic [31:0] s_saddr [NUM_SLOTS];
  logic [2:0]  s_ssize [NUM_SLOTS];

  int checks = 0, failures = 0;
  int snoop_grants = 0;

  always #5 clk = ~clk;

  sgm_master_wrapper #(.ADDR_W(32), .DATA_W(32), .SLOT_EN(16'h7FFF), .SNOOP_EN(1'b1)) dut (
    .clk, .rst_n, .d_req, .d_addr, .d_size, .d_wnr, .d_wdata, .d_grant, .d_rdata, .d_wait,
    .d_error, .s_req, .s_addr, .s_size, .s_wnr, .s_wdata, .s_grant, .s_rdata, .s_wait,
    .s_error, .s_snoop, .s_saddr, .s_ssize);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic clear_slaves();
    for (int k = 0; k < NUM_SLOTS; k++) begin
      s_grant[k] = 0; s_wait[k] = 0; s_error[k] = 0; s_snoop[k] = 0;
    end
  endtask

  task automatic req(input logic [31:0] a, input logic [2:0] sz, input logic w);
    d_req = 1; d_addr = a; d_size = sz; d_wnr = w; d_wdata = a ^ 32'h5555_AAAA;
  endtask

  // advance to the next cycle (inputs change 1 time unit after the edge)
  task automatic next();
    @(posedge clk); #1;
    clear_slaves();
  endtask

  task automatic settle(); #2; endtask

  task automatic expect_out(input bit g, input bit w, input bit e, input string tag);
    settle();
    chk(d_grant == g, $sformatf("%s: SGGRANT %0b expected %0b", tag, d_grant, g));
    chk(d_wait == w,  $sformatf("%s: SGWAIT %0b expected %0b", tag, d_wait, w));
    chk(d_error == e, $sformatf("%s: SGERROR %0b expected %0b", tag, d_error, e));
  endtask

  // a grant with no slave granting is a snoop grant
  always @(posedge clk) begin
    bit any;
    any = 0;
    for (int k = 0; k < NUM_SLOTS; k++) any |= s_grant[k];
    if (rst_n && d_grant && !any) snoop_grants++;
  end

  initial begin
    for (int k = 0; k < NUM_SLOTS; k++) begin
      s_rdata[k] = 32'hD000_0000 + k; s_saddr[k] = 0; s_ssize[k] = 0;
    end
    clear_slaves();
    d_req = 0; d_addr = 0; d_size = 0; d_wnr = 0; d_wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    next();

    // ------------------------------------------------------------ routing
    req(32'h5000_0010, SZ_32, 0);
    settle();
    for (int k = 0; k < NUM_SLOTS; k++)
      chk(s_req[k] == (k == 5), $sformatf("SGREQ decoded to slot 5 (slot %0d=%0b)", k, s_req[k]));
    chk(s_addr == 32'h5000_0010 && s_size == SZ_32 && !s_wnr, "address broadcast");
    expect_out(0, 0, 0, "not yet granted");
    next();
    s_grant[5] = 1; s_wait[5] = 1;
    expect_out(1, 1, 0, "granted, first data cycle is a wait cycle");
    next();
    // wait cycle: no request allowed; the address bus may already move on
    d_req = 0; d_addr = 32'h7000_0000;
    s_wait[5] = 0; s_wait[7] = 1;   // slot 5 ends its waits; slot 7 busy
    expect_out(0, 0, 0, "wait cycle status from slot 5, not slot 7");
    chk(d_rdata == 32'hD000_0005, "SGRDATA from the data-phase slot");
    next();
    // final cycle of slot 5; new address phase to slot 7 in the same cycle
    req(32'h7000_0004, SZ_32, 1);
    s_wait[5] = 1;             // slot 5 already busy with someone else: ignored
    s_grant[7] = 1; s_error[7] = 1;
    expect_out(1, 0, 1, "address phase at slot 7 while slot 5 finishes");
    chk(d_rdata == 32'hD000_0005, "SGRDATA still from slot 5");
    chk(s_wdata == (32'h7000_0004 ^ 32'h5555_AAAA), "SGWDATA broadcast");
    next();
    d_req = 0;
    expect_out(0, 0, 0, "slot 7 error cycle");
    chk(d_rdata == 32'hD000_0007, "SGRDATA now from slot 7");
    next();

    // ----------------------------------------------------- disabled slot
    req(32'hF000_0000, SZ_32, 0);
    s_grant[15] = 1;
    settle();
    chk(!s_req[15], "no SGREQ to a disabled slot");
    expect_out(0, 0, 0, "no grant from a disabled slot");
    d_req = 0;
    next();

    // ------------------------------------------------- snooping: success
    req(32'h3000_0102, SZ_16, 0);
    s_snoop[3] = 1; s_wait[3] = 1;            // someone else won, 2+ cycles
    expect_out(0, 0, 0, "lost arbitration (s0 -> s1)");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 1;
    expect_out(0, 0, 0, "s1 compare, slave still waiting (s1 -> s2)");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 1;
    expect_out(0, 0, 0, "s2 waiting");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 0;
    expect_out(1, 0, 0, "SGGRANT on the way into s3");
    next();
    d_req = 0;
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32;
    expect_out(0, 0, 0, "s3: last cycle");
    chk(d_rdata == 32'hD000_0003, "snooped SGRDATA forwarded");
    next();

    // ------------------------- snooping: direct s1 -> s3, then s3 -> s1
    req(32'h3000_0100, SZ_32, 0);
    s_snoop[3] = 1; s_wait[3] = 1;
    expect_out(0, 0, 0, "lost (s0 -> s1)");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 0;
    expect_out(1, 0, 0, "s1 match with last cycle next: grant (s1 -> s3)");
    next();
    // s3: new read in the last cycle, loses again to a snoopable transaction
    req(32'h3000_0201, SZ_8, 0);
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_snoop[3] = 1; s_wait[3] = 1;
    expect_out(0, 0, 0, "s3 with a new lost read (s3 -> s1)");
    chk(d_rdata == 32'hD000_0003, "s3 data");
    next();
    s_saddr[3] = 32'h3000_0200; s_ssize[3] = SZ_32; s_wait[3] = 0;
    expect_out(1, 0, 0, "second snoop granted");
    next();
    d_req = 0;
    next();

    // --------------------------------- snooping refused: larger request
    req(32'h3000_0100, SZ_64, 0);
    s_snoop[3] = 1; s_wait[3] = 1;
    expect_out(0, 0, 0, "lost");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 1;
    expect_out(0, 0, 0, "s1: 64-bit request against 32-bit transaction");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 0;
    expect_out(0, 0, 0, "no snoop grant after a size mismatch");
    next();
    s_grant[3] = 1;
    expect_out(1, 0, 0, "ordinary grant once the slave is free");
    next();
    d_req = 0;
    next();

    // ------------------------------ snooping refused: different address
    req(32'h3000_0104, SZ_32, 0);
    s_snoop[3] = 1; s_wait[3] = 1;
    expect_out(0, 0, 0, "lost");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 0;
    expect_out(0, 0, 0, "s1: word 0x104 is not in transaction 0x100");
    next();
    s_grant[3] = 1;
    expect_out(1, 0, 0, "ordinary grant");
    next();
    d_req = 0;
    next();

    // ---------------------------------------- snooping abandoned on error
    req(32'h3000_0100, SZ_32, 0);
    s_snoop[3] = 1; s_wait[3] = 1;
    expect_out(0, 0, 0, "lost");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 1;
    expect_out(0, 0, 0, "s1 match, still waiting");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_error[3] = 1;
    expect_out(0, 0, 0, "s2: slave signals SGERROR - no snoop grant");
    next();
    s_grant[3] = 1;
    expect_out(1, 0, 0, "ordinary grant");
    next();
    d_req = 0;
    next();

    // ------------------------------------------------ writes never snoop
    req(32'h3000_0100, SZ_32, 1);
    s_snoop[3] = 1; s_wait[3] = 1;
    expect_out(0, 0, 0, "write lost");
    next();
    s_saddr[3] = 32'h3000_0100; s_ssize[3] = SZ_32; s_wait[3] = 0;
    expect_out(0, 0, 0, "no snoop for a write");
    next();
    s_grant[3] = 1;
    expect_out(1, 0, 0, "write granted normally");
    next();
    d_req = 0;
    next();

    chk(snoop_grants == 3, $sformatf("three snoop grants (%0d)", snoop_grants));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
