// Testbench for sgm_ahb_adapter. An AHB-Lite master model issues pipelined
// transfers; the SG-Multi side is played by a responder in the testbench that
// grants each request after a random delay (zero to three cycles), answers
// with a random number of wait cycles and rejects any address with bit 27 set
// with SGERROR. Checked:
//   - every SG-Multi request carries the address, size and direction of the
//     next accepted AHB transfer, in order;
//   - HREADY is low in every SG-Multi wait cycle and in every cycle after a
//     request went ungranted, and high in the final data cycle;
//   - SGERROR becomes the two-cycle AHB error response (HRESP high with
//     HREADY low, then HRESP high with HREADY high);
//   - read data reaches the AHB master on the right byte lanes, write data
//     reaches SG-Multi in the final data cycle;
//   - with immediate grants and no wait cycles, N back-to-back transfers take
//     N+1 cycles, i.e. the adapter adds no cycle.
module tb_sgm_ahb_adapter;
  import sgm_tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  logic        sg_req, sg_wnr, sg_grant, sg_wait, sg_error;
  logic [31:0] sg_addr, sg_wdata, sg_rdata;
  logic [2:0]  sg_size;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sgm_ahb_master_model u_m (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata, .hready, .hresp);

  sgm_ahb_adapter #(.ADDR_W(32), .DATA_W(32)) dut (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hsize, .hburst(3'b000), .hprot(4'b0011),
    .hmastlock(1'b0), .hwdata, .hrdata, .hready, .hresp,
    .sg_req, .sg_addr, .sg_size, .sg_wnr, .sg_wdata, .sg_grant, .sg_rdata, .sg_wait, .sg_error);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [31:0] wval(input logic [31:0] a);
    return (a * 32'd3) ^ 32'hA5C3_0F69;
  endfunction

  // ------------------------------------------------------- SG responder
  bit          fast = 0;           // immediate grants, no waits, no errors
  int unsigned gdelay, nw_next;
  logic        dp, wq, eq, wnr_q;
  int unsigned cnt;
  logic [31:0] a_q;
  logic [2:0]  sz_q;
  logic        open;
  int unsigned n_grants, n_delayed, n_waitcyc, n_errs;

  assign open     = !(dp && wq);
  assign sg_grant = sg_req && open && gdelay == 0;
  assign sg_rdata = pattern(a_q);

  always_comb begin
    sg_wait  = 1'b0;
    sg_error = 1'b0;
    if (dp && wq) begin
      sg_wait  = cnt > 0;
      sg_error = (cnt == 0) && eq;
    end else if (sg_grant) begin
      sg_wait  = nw_next > 0;
      sg_error = (nw_next == 0) && sg_addr[27];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp <= 0; wq <= 0; eq <= 0; cnt <= 0; a_q <= '0; sz_q <= '0; wnr_q <= 0;
      gdelay <= 0; nw_next <= 0;
      n_grants <= 0; n_delayed <= 0; n_waitcyc <= 0; n_errs <= 0;
    end else begin
      if (sg_req && !sg_grant) n_delayed <= n_delayed + 1;
      if (dp && wq) n_waitcyc <= n_waitcyc + 1;
      if (sg_grant) begin
        dp <= 1; wq <= nw_next > 0; eq <= sg_addr[27];
        cnt <= (nw_next > 0) ? nw_next - 1 : 0;
        a_q <= sg_addr; sz_q <= sg_size; wnr_q <= sg_wnr;
        n_grants <= n_grants + 1;
        if (sg_addr[27]) n_errs <= n_errs + 1;
        gdelay  <= fast ? 0 : (($urandom_range(1, 0) == 1) ? 0 : $urandom_range(3, 1));
        nw_next <= fast ? 0 : $urandom_range(3, 0);
      end else begin
        if (sg_req && gdelay > 0) gdelay <= gdelay - 1;
        if (dp && wq) begin
          wq <= cnt > 0;
          if (cnt > 0) cnt <= cnt - 1;
        end else dp <= 0;
      end
    end
  end

  // ------------------------------------------------------------ checkers
  logic [35:0] exp_q [$];   // {write, size, addr} of accepted AHB transfers
  logic        prev_err_first, prev_ungranted;

  always @(posedge clk) if (rst_n) begin
    if (hready && htrans[1]) exp_q.push_back({hwrite, hsize, haddr});
    if (sg_req && sg_grant) begin
      logic [35:0] e;
      chk(exp_q.size() != 0, "SG request without an AHB transfer");
      if (exp_q.size() != 0) begin
        e = exp_q.pop_front();
        chk({sg_wnr, sg_size, sg_addr} == e,
            $sformatf("SG request %h/%0d/%0b, expected %h/%0d/%0b",
                      sg_addr, sg_size, sg_wnr, e[31:0], e[34:32], e[35]));
      end
    end
  end

  // cycle-by-cycle relation between the two buses (checked mid-cycle)
  always @(negedge clk) if (rst_n) begin
    if (dp && wq)
      chk(!hready, "HREADY low in an SG wait cycle");
    else if (dp && !wq) begin
      chk(hready == !eq && hresp == eq, "final SG data cycle: HREADY/HRESP");
      if (wnr_q && !eq)
        chk(((sg_wdata ^ wval(a_q)) & lane_mask(a_q, sz_q)) == 0,
            $sformatf("write data %h at %h", sg_wdata, a_q));
    end
    // the cycle after an ungranted request cannot end the AHB data phase
    if (prev_ungranted) chk(!hready, "HREADY low while waiting for SGGRANT");
    prev_ungranted = sg_req && !sg_grant;
    if (hresp && hready) chk(prev_err_first, "error response second cycle follows first");
    prev_err_first = hresp && !hready;
  end

  // -------------------------------------------------------------- stimulus
  function automatic ahb_op_t rand_op(input bit allow_err, input bit allow_gap);
    ahb_op_t op;
    logic [2:0] sz;
    sz = 3'($urandom_range(2, 0));
    op.addr  = {4'h2, 1'b0, 17'h0, 8'($urandom), 2'b00};
    op.addr[1:0] = (sz == 0) ? 2'($urandom) : (sz == 1) ? {1'($urandom), 1'b0} : 2'b00;
    if (allow_err && $urandom_range(7, 0) == 0) op.addr[27] = 1'b1;
    op.size    = sz;
    op.write   = $urandom_range(1, 0) == 1;
    op.wdata   = wval(op.addr);
    op.check   = 1'b1;
    op.exp     = pattern(op.addr);
    op.exp_err = op.addr[27];
    op.gap     = allow_gap ? 8'($urandom_range(3, 0) == 0 ? $urandom_range(2, 1) : 0) : 8'd0;
    return op;
  endfunction

  initial begin
    int unsigned st0, c0, c1;
    prev_err_first = 0;
    prev_ungranted = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Phase 1: no added latency.
    fast = 1;
    @(posedge clk); #1;
    st0 = u_m.n_stall;
    c0  = int'(u_m.cyc);
    for (int i = 0; i < 20; i++) u_m.push(rand_op(0, 0));
    do @(posedge clk); while (!u_m.idle());
    c1 = int'(u_m.last_done_cycle);
    chk(u_m.n_stall == st0, $sformatf("no stall with immediate grants (%0d)", u_m.n_stall - st0));
    chk(c1 - c0 == 21, $sformatf("20 back-to-back transfers take %0d cycles, 21 expected", c1 - c0));

    // Phase 2: random grant delays, wait cycles and errors.
    @(posedge clk); #1 fast = 0;
    for (int i = 0; i < 600; i++) u_m.push(rand_op(1, 1));
    do @(posedge clk); while (!u_m.idle());
    repeat (3) @(posedge clk);

    chk(u_m.n_done == 620, $sformatf("all transfers completed (%0d)", u_m.n_done));
    chk(u_m.n_fail == 0, "AHB master model found no wrong data or response");
    chk(n_grants == 620, $sformatf("one SG transfer per AHB transfer (%0d)", n_grants));
    chk(exp_q.size() == 0, "no AHB transfer left without an SG request");
    chk(n_delayed > 0 && n_waitcyc > 0 && n_errs > 0 && u_m.n_err_seen == n_errs,
        $sformatf("delays %0d, wait cycles %0d, errors %0d/%0d", n_delayed, n_waitcyc,
                  n_errs, u_m.n_err_seen));
    checks += u_m.n_checks;
    failures += u_m.n_fail;
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
