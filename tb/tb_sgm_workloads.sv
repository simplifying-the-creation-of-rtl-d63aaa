// Benchmark testbench: the two 100-read programs (see sgm_workload_bench) on
// systems of 1, 2, 3, 4 and 8 AHB-Lite masters.
//
// Interfering transactions (all masters read the same SRAM words):
//   with bus snooping the run takes as long as with one master, because the
//   masters that lose arbitration take the winner's read data;
//   without bus snooping every extra master adds 100 SRAM transactions of
//   four cycles, i.e. 400 cycles.
// Non-interfering transactions (each master its own slave): the run takes as
// long as with one master whatever the number of masters.
// One master with the arbiter left out of the slave wrappers must take as
// long as one master with arbiters (the arbiter adds no cycle).
// Every expected count is derived from the single-master run and the SRAM
// timing of four cycles per transaction; the measured counts are printed.
module tb_sgm_workloads;
  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NC = 5;
  localparam int NMS [NC] = '{1, 2, 3, 4, 8};

  logic        d_sn [NC], d_ns [NC], d_sep [NC], d_byp;
  int unsigned c_sn [NC], c_ns [NC], c_sep [NC], c_byp;
  int unsigned f_sn [NC], f_ns [NC], f_sep [NC], f_byp;
  int unsigned t_sn [NC], t_ns [NC], t_sep [NC], t_byp;

  for (genvar k = 0; k < NC; k++) begin : g_cfg
    sgm_workload_bench #(.N(NMS[k]), .SNOOP(1'b1), .SHARED(1'b1)) u_sn (
      .clk, .rst_n, .go, .done(d_sn[k]), .cycles(c_sn[k]), .fails(f_sn[k]), .slave_txns(t_sn[k]));
    sgm_workload_bench #(.N(NMS[k]), .SNOOP(1'b0), .SHARED(1'b1)) u_ns (
      .clk, .rst_n, .go, .done(d_ns[k]), .cycles(c_ns[k]), .fails(f_ns[k]), .slave_txns(t_ns[k]));
    sgm_workload_bench #(.N(NMS[k]), .SNOOP(1'b1), .SHARED(1'b0)) u_sep (
      .clk, .rst_n, .go, .done(d_sep[k]), .cycles(c_sep[k]), .fails(f_sep[k]), .slave_txns(t_sep[k]));
  end

  sgm_workload_bench #(.N(1), .SNOOP(1'b1), .SHARED(1'b1), .BYPASS(1'b1)) u_byp (
    .clk, .rst_n, .go, .done(d_byp), .cycles(c_byp), .fails(f_byp), .slave_txns(t_byp));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit all_done();
    bit d;
    d = d_byp;
    for (int k = 0; k < NC; k++) d = d && d_sn[k] && d_ns[k] && d_sep[k];
    return d;
  endfunction

  initial begin
    int unsigned base;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1 go = 1;
    do @(posedge clk); while (!all_done());
    repeat (2) @(posedge clk);

    base = c_sn[0];
    $display("masters  snoop  no-snoop  separate  (cycles for 100 reads per master)");
    for (int k = 0; k < NC; k++)
      $display("%7d  %5d  %8d  %8d", NMS[k], c_sn[k], c_ns[k], c_sep[k]);
    $display("one master without arbiters: %0d", c_byp);

    chk(base >= 400 && base <= 404, $sformatf("one master: 100 reads of 4 cycles (%0d)", base));
    for (int k = 0; k < NC; k++) begin
      chk(c_sn[k] == base, $sformatf("%0d masters, snooping: %0d cycles, %0d expected",
                                     NMS[k], c_sn[k], base));
      chk(t_sn[k] == 100, $sformatf("%0d masters, snooping: %0d SRAM transactions", NMS[k], t_sn[k]));
      chk(c_ns[k] == base + 400 * (NMS[k] - 1),
          $sformatf("%0d masters, no snooping: %0d cycles, %0d expected", NMS[k], c_ns[k],
                    base + 400 * (NMS[k] - 1)));
      chk(t_ns[k] == 100 * NMS[k], $sformatf("%0d masters, no snooping: %0d SRAM transactions",
                                             NMS[k], t_ns[k]));
      chk(c_sep[k] == base, $sformatf("%0d masters, separate slaves: %0d cycles, %0d expected",
                                      NMS[k], c_sep[k], base));
      chk(f_sn[k] == 0 && f_ns[k] == 0 && f_sep[k] == 0, "read data of every run");
    end
    chk(c_byp == base && f_byp == 0, $sformatf("no arbiter: %0d cycles", c_byp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
