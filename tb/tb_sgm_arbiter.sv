// Testbench for sgm_arbiter: N arbiter units joined by an OR-based common
// interconnect, as inside a slave wrapper, driven with random requests,
// random one-hot dynamic levels and a random permutation of unique one-hot
// static levels. The expected winner is computed independently: among the
// requesters, the highest dynamic level wins, ties go to the highest static
// level; no request, no grant. The contribution outputs are checked too.
module tb_sgm_arbiter;
  localparam int N = 4;
  localparam int D = 4;

  logic         req   [N];
  logic [D-1:0] dyn   [N];
  logic [N-1:0] stat  [N];
  logic [D-1:0] dcon  [N];
  logic [N-1:0] scon  [N];
  logic         grant [N];
  logic [D-1:0] dcommon;
  logic [N-1:0] scommon;

  int checks = 0, failures = 0;

  always_comb begin
    dcommon = '0;
    scommon = '0;
    for (int i = 0; i < N; i++) begin
      dcommon |= dcon[i];
      scommon |= scon[i];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_u
    sgm_arbiter #(.NUM_SLOTS(N), .DYN_LEVELS(D)) dut (
      .req(req[i]), .dyn_level(dyn[i]), .stat_level(stat[i]),
      .dyn_common(dcommon), .stat_common(scommon),
      .dyn_contrib(dcon[i]), .stat_contrib(scon[i]), .grant(grant[i]));
  end

  function automatic int bitpos(input logic [31:0] v);
    for (int b = 0; b < 32; b++) if (v[b]) return b;
    return -1;
  endfunction

  task automatic check_round(input string tag);
    int best, bd, bs, ngr;
    best = -1; bd = -1; bs = -1; ngr = 0;
    for (int i = 0; i < N; i++)
      if (req[i]) begin
        int d, s;
        d = bitpos(32'(dyn[i]));
        s = bitpos(32'(stat[i]));
        if (d > bd || (d == bd && s > bs)) begin
          best = i; bd = d; bs = s;
        end
      end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (grant[i] !== (i == best)) begin
        failures++;
        $display("FAIL %s: unit %0d grant %0b expected winner %0d", tag, i, grant[i], best);
      end
      checks++;
      if (dcon[i] !== (req[i] ? dyn[i] : '0)) begin
        failures++;
        $display("FAIL %s: unit %0d dyn_contrib %b", tag, i, dcon[i]);
      end
    end
  endtask

  initial begin
    int perm [N];
    // Directed cases first.
    for (int i = 0; i < N; i++) begin
      req[i] = 1'b0; dyn[i] = D'(1); stat[i] = N'(1) << (N - 1 - i);
    end
    #1 check_round("no request");
    req[2] = 1'b1; req[3] = 1'b1;
    #1 check_round("equal dynamic, static decides");
    dyn[3] = D'(4);
    #1 check_round("higher dynamic beats higher static");
    // Random rounds.
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(i, 0);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int i = 0; i < N; i++) begin
        req[i]  = $urandom_range(1, 0) == 1;
        dyn[i]  = D'(1) << $urandom_range(D - 1, 0);
        stat[i] = N'(1) << perm[i];
      end
      #1 check_round("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
