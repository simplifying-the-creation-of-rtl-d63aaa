// SG-Multi slave device wrapper.
//
// Connects one slave device to up to NUM_SLOTS master wrappers and resolves
// contention between them, so that the slave can be built as if it had a
// single master. Per clock cycle:
//   * Request timing filter: a master's SGREQ reaches its arbiter only in a
//     cycle that began with SGWAIT deasserted (the slave is idle or in the
//     last cycle of a data phase), so arbitration never interrupts a
//     transaction. wait_q holds SGWAIT as sampled at the last rising edge.
//   * Arbitration: one sgm_arbiter per slot. The wrapper supplies each slot's
//     static level (one-hot, slot 0 highest) and its dynamic level register,
//     and ORs the units' priority outputs into the common arbiter interconnect.
//   * Dynamic priority: one-hot register per slot, starting at level 0
//     (bit 0). Shifted left on every edge where the filtered request is not
//     granted, saturating at the top level; back to level 0 when granted.
//   * Address phase: the winner's SGADDR/SGSIZE/SGWnR go to the slave together
//     with SGACTIVATE, all in the cycle of the grant.
//   * Data phase: the winner's slot is kept in dp_owner; its SGWDATA is
//     forwarded to the slave until the phase ends.
//   * Snooping support: SGSADDR/SGSSIZE, the address and size of the
//     transaction in its data phase, are broadcast to all master wrappers, as
//     are SGSNOOP (qualified with SGACTIVATE), SGWAIT, SGERROR and SGRDATA.
// With BYPASS_ARBITER set and a single slot the arbiter is left out and the
// grant is the filtered request (the single-master optimisation).
//
// Timing: SGGRANT and SGACTIVATE are combinational from the requests in the
// address-phase cycle; SGWAIT/SGERROR/SGSNOOP from the slave are passed back
// combinationally and take effect at the next rising edge.
// Assertions check the slave's side of the protocol: at most one grant per
// cycle, SGWAIT and SGERROR never together, and SGERROR only in an address
// phase or a wait cycle.
//
// What follows the SG-Multi description: the filter, slot-based one-hot static
// and dynamic priorities with dynamic priority first, the left-shift update,
// the common interconnect, the broadcast of SGSADDR/SGSSIZE, the 16-slot limit.
// This implementation's choices: static level order (slot 0 highest), the
// dynamic level being held (not changed) in cycles without a filtered request,
// SGSNOOP being gated by SGACTIVATE before broadcast, and the reset values.
module sgm_slave_wrapper #(
  parameter int unsigned NUM_SLOTS      = 4,
  parameter int unsigned DYN_LEVELS     = 4,
  parameter int unsigned ADDR_W         = 32,
  parameter int unsigned DATA_W         = 32,
  parameter bit          BYPASS_ARBITER = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // master side, one entry per slot
  input  logic                 m_req   [NUM_SLOTS],
  input  logic [ADDR_W-1:0]    m_addr  [NUM_SLOTS],
  input  logic [2:0]           m_size  [NUM_SLOTS],
  input  logic                 m_wnr   [NUM_SLOTS],
  input  logic [DATA_W-1:0]    m_wdata [NUM_SLOTS],
  output logic                 m_grant [NUM_SLOTS],
  // broadcast to all connected master wrappers
  output logic [DATA_W-1:0]    b_rdata,
  output logic                 b_wait,
  output logic                 b_error,
  output logic                 b_snoop,
  output logic [ADDR_W-1:0]    b_saddr,
  output logic [2:0]           b_ssize,
  // slave device interface
  output logic                 s_activate,
  output logic [ADDR_W-1:0]    s_addr,
  output logic [2:0]           s_size,
  output logic                 s_wnr,
  output logic [DATA_W-1:0]    s_wdata,
  input  logic [DATA_W-1:0]    s_rdata,
  input  logic                 s_wait,
  input  logic                 s_error,
  input  logic                 s_snoop
);

  localparam int unsigned IDX_W = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1;

  initial begin
    assert (NUM_SLOTS >= 1 && NUM_SLOTS <= sgm_pkg::NUM_SLOTS)
      else $error("slave wrapper supports 1 to 16 slots");
    assert (DYN_LEVELS >= 1) else $error("DYN_LEVELS must be at least 1");
  end

  // ---------------------------------------------------------------- state
  logic                  dp_valid;   // a data phase is in progress
  logic                  wait_q;     // SGWAIT sampled at the last rising edge
  logic [IDX_W-1:0]      dp_owner;   // slot that owns the data phase
  logic [ADDR_W-1:0]     saddr_q;
  logic [2:0]            ssize_q;
  logic [DYN_LEVELS-1:0] dyn_q [NUM_SLOTS];

  // ------------------------------------------------------ request filter
  logic open_cycle;
  logic req_f [NUM_SLOTS];

  assign open_cycle = !(dp_valid && wait_q);
  always_comb
    for (int i = 0; i < NUM_SLOTS; i++) req_f[i] = m_req[i] && open_cycle;

  // --------------------------------------------------------- arbitration
  logic                  grant [NUM_SLOTS];

  if (BYPASS_ARBITER && NUM_SLOTS == 1) begin : g_bypass
    assign grant[0] = req_f[0];
  end else begin : g_arb
    logic [DYN_LEVELS-1:0] dyn_contrib  [NUM_SLOTS];
    logic [NUM_SLOTS-1:0]  stat_contrib [NUM_SLOTS];
    logic [DYN_LEVELS-1:0] dyn_common;
    logic [NUM_SLOTS-1:0]  stat_common;

    // Common arbiter interconnect: OR of every unit's priority outputs.
    always_comb begin
      dyn_common  = '0;
      stat_common = '0;
      for (int i = 0; i < NUM_SLOTS; i++) begin
        dyn_common  = dyn_common  | dyn_contrib[i];
        stat_common = stat_common | stat_contrib[i];
      end
    end

    for (genvar i = 0; i < NUM_SLOTS; i++) begin : g_unit
      localparam logic [NUM_SLOTS-1:0] STAT = NUM_SLOTS'(1) << (NUM_SLOTS - 1 - i);
      sgm_arbiter #(.NUM_SLOTS(NUM_SLOTS), .DYN_LEVELS(DYN_LEVELS)) u_arb (
        .req          (req_f[i]),
        .dyn_level    (dyn_q[i]),
        .stat_level   (STAT),
        .dyn_common   (dyn_common),
        .stat_common  (stat_common),
        .dyn_contrib  (dyn_contrib[i]),
        .stat_contrib (stat_contrib[i]),
        .grant        (grant[i])
      );
    end
  end

  logic [NUM_SLOTS-1:0] grant_vec;
  always_comb
    for (int i = 0; i < NUM_SLOTS; i++) begin
      m_grant[i]   = grant[i];
      grant_vec[i] = grant[i];
    end

  // ------------------------------------------- winner select, activation
  logic [IDX_W-1:0] winner;
  logic             any_grant;

  always_comb begin
    winner    = '0;
    any_grant = 1'b0;
    for (int i = 0; i < NUM_SLOTS; i++)
      if (grant[i]) begin
        winner    = IDX_W'(i);
        any_grant = 1'b1;
      end
  end

  assign s_activate = any_grant;
  assign s_addr     = m_addr[winner];
  assign s_size     = m_size[winner];
  assign s_wnr      = m_wnr[winner];
  assign s_wdata    = m_wdata[dp_owner];

  // ------------------------------------------------------ broadcast back
  assign b_rdata = s_rdata;
  assign b_wait  = s_wait;
  assign b_error = s_error;
  assign b_snoop = s_snoop && any_grant;
  assign b_saddr = saddr_q;
  assign b_ssize = ssize_q;

  // ------------------------------------------------- data phase tracking
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid <= 1'b0;
      wait_q   <= 1'b0;
      dp_owner <= '0;
      saddr_q  <= '0;
      ssize_q  <= '0;
    end else if (any_grant) begin
      dp_valid <= 1'b1;
      wait_q   <= s_wait;
      dp_owner <= winner;
      saddr_q  <= m_addr[winner];
      ssize_q  <= m_size[winner];
    end else if (dp_valid && wait_q) begin
      wait_q   <= s_wait;
    end else begin
      dp_valid <= 1'b0;
      wait_q   <= 1'b0;
    end
  end

  // ---------------------------------------------------- dynamic priority
  for (genvar i = 0; i < NUM_SLOTS; i++) begin : g_dyn
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        dyn_q[i] <= DYN_LEVELS'(1);
      else if (grant[i])
        dyn_q[i] <= DYN_LEVELS'(1);
      else if (req_f[i] && !dyn_q[i][DYN_LEVELS-1])
        dyn_q[i] <= dyn_q[i] << 1;
    end
  end

  // ---------------------------------------------------------- protocol rules
  // At most one master wins a round.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant_vec));
  // A slave never reports SGWAIT and SGERROR together at an edge it is heard.
  a_wait_err_excl: assert property (@(posedge clk) disable iff (!rst_n)
    (any_grant || (dp_valid && wait_q)) |-> !(s_wait && s_error));
  // SGERROR only in the address-phase cycle (rejecting the transfer) or in a
  // wait cycle (ending the transaction with an error); never once a cycle
  // has begun with SGWAIT low, i.e. the slave promised to finish.
  a_err_timing: assert property (@(posedge clk) disable iff (!rst_n)
    s_error |-> (any_grant || (dp_valid && wait_q)));

endmodule
