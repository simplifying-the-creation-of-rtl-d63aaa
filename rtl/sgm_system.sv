// SG-Multi interconnection fabric, top level.
//
// A multi-bus interconnect for multi-core processors. Each master device sits
// behind a master wrapper (and, for masters with a foreign bus such as an
// AHB-Lite Cortex-M0, behind a bus adapter first); each slave device sits
// behind a slave wrapper holding one arbiter per master. Master wrapper m and
// slave wrapper s are joined by plain wires, so transactions between
// different master/slave pairs proceed in the same cycle and only masters
// that want the same slave compete, at that slave. Masters that lose to a
// snoopable read of the same data can take its result through bus snooping.
//
// Address map: slave s occupies the 1/16 of the address space whose top four
// address bits equal s. CONN[m][s] says whether master m is wired to slave s;
// a master's request to an unwired slave is never granted. Within a slave
// wrapper, master m uses slot m (slot 0 has the highest static priority).
//
// Ports: per master either an AHB-Lite port (AHB_MASTERS[m] = 1, adapter
// included) or a native SG-Multi master port (AHB_MASTERS[m] = 0); the port
// set that is not used for a master is ignored on input and driven to zero
// on output. Per slave a native SG-Multi slave port. One clock, asynchronous
// active-low reset (SGCLK, SGRESETn).
//
// Timing: two-stage pipelined transactions, address phase then data phase;
// arbitration happens inside the address-phase cycle; slaves report SGWAIT /
// SGERROR one cycle ahead; with an immediate grant and no wait cycles a
// transaction costs one address cycle overlapped with the previous data cycle.
//
// ARB_BYPASS leaves the arbiter out of every slave wrapper when there is a
// single master (the request, filtered, is the grant), the area optimisation
// for single-master systems.
//
// The composition follows the SG-Multi system description. The parameter
// defaults - four masters, all AHB-Lite, sixteen slave ports, full
// connectivity, four dynamic priority levels - are this implementation's
// choice of a representative configuration.
module sgm_system
  import sgm_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_SLAVES  = 16,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned DYN_LEVELS  = 4,
  parameter bit          SNOOP_EN    = 1'b1,
  parameter bit          ARB_BYPASS  = 1'b0,
  parameter logic [NUM_MASTERS-1:0]                AHB_MASTERS = '1,
  parameter logic [NUM_MASTERS-1:0][NUM_SLOTS-1:0] CONN        = '1
) (
  input  logic              sgclk,
  input  logic              sgresetn,
  // ---- AHB-Lite master ports (used where AHB_MASTERS[m] = 1)
  input  logic [ADDR_W-1:0] haddr     [NUM_MASTERS],
  input  logic [1:0]        htrans    [NUM_MASTERS],
  input  logic              hwrite    [NUM_MASTERS],
  input  logic [2:0]        hsize     [NUM_MASTERS],
  input  logic [2:0]        hburst    [NUM_MASTERS],
  input  logic [3:0]        hprot     [NUM_MASTERS],
  input  logic              hmastlock [NUM_MASTERS],
  input  logic [DATA_W-1:0] hwdata    [NUM_MASTERS],
  output logic [DATA_W-1:0] hrdata    [NUM_MASTERS],
  output logic              hready    [NUM_MASTERS],
  output logic              hresp     [NUM_MASTERS],
  // ---- native SG-Multi master ports (used where AHB_MASTERS[m] = 0)
  input  logic              m_req     [NUM_MASTERS],
  input  logic [ADDR_W-1:0] m_addr    [NUM_MASTERS],
  input  logic [2:0]        m_size    [NUM_MASTERS],
  input  logic              m_wnr     [NUM_MASTERS],
  input  logic [DATA_W-1:0] m_wdata   [NUM_MASTERS],
  output logic              m_grant   [NUM_MASTERS],
  output logic [DATA_W-1:0] m_rdata   [NUM_MASTERS],
  output logic              m_wait    [NUM_MASTERS],
  output logic              m_error   [NUM_MASTERS],
  // ---- SG-Multi slave ports
  output logic              s_activate [NUM_SLAVES],
  output logic [ADDR_W-1:0] s_addr     [NUM_SLAVES],
  output logic [2:0]        s_size     [NUM_SLAVES],
  output logic              s_wnr      [NUM_SLAVES],
  output logic [DATA_W-1:0] s_wdata    [NUM_SLAVES],
  input  logic [DATA_W-1:0] s_rdata    [NUM_SLAVES],
  input  logic              s_wait     [NUM_SLAVES],
  input  logic              s_error    [NUM_SLAVES],
  input  logic              s_snoop    [NUM_SLAVES]
);

  initial assert (NUM_SLAVES >= 1 && NUM_SLAVES <= NUM_SLOTS && NUM_MASTERS >= 1 &&
                  NUM_MASTERS <= NUM_SLOTS)
    else $error("1 to 16 masters and slaves are supported");

  // ---------------------------------------------- master-side device buses
  logic              d_req   [NUM_MASTERS];
  logic [ADDR_W-1:0] d_addr  [NUM_MASTERS];
  logic [2:0]        d_size  [NUM_MASTERS];
  logic              d_wnr   [NUM_MASTERS];
  logic [DATA_W-1:0] d_wdata [NUM_MASTERS];
  logic              d_grant [NUM_MASTERS];
  logic [DATA_W-1:0] d_rdata [NUM_MASTERS];
  logic              d_wait  [NUM_MASTERS];
  logic              d_error [NUM_MASTERS];

  // ------------------------------------------------------ fabric wiring
  // master m -> all slots (SGREQ decoded, rest broadcast)
  logic              f_req   [NUM_MASTERS][NUM_SLOTS];
  logic [ADDR_W-1:0] f_addr  [NUM_MASTERS];
  logic [2:0]        f_size  [NUM_MASTERS];
  logic              f_wnr   [NUM_MASTERS];
  logic [DATA_W-1:0] f_wdata [NUM_MASTERS];
  // slot s -> master m
  logic              f_grant [NUM_MASTERS][NUM_SLOTS];
  // slot s broadcast
  logic [DATA_W-1:0] f_rdata [NUM_SLOTS];
  logic              f_wait  [NUM_SLOTS];
  logic              f_error [NUM_SLOTS];
  logic              f_snoop [NUM_SLOTS];
  logic [ADDR_W-1:0] f_saddr [NUM_SLOTS];
  logic [2:0]        f_ssize [NUM_SLOTS];

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    // Slots without a slave, or not wired to this master, are disabled.
    localparam logic [NUM_SLOTS-1:0] EN = CONN[m] & ((NUM_SLOTS'(1) << NUM_SLAVES) - 1'b1 |
                                           {NUM_SLOTS{NUM_SLAVES >= NUM_SLOTS}});

    if (AHB_MASTERS[m]) begin : g_ahb
      sgm_ahb_adapter #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_adapter (
        .clk       (sgclk),
        .rst_n     (sgresetn),
        .haddr     (haddr[m]),
        .htrans    (htrans[m]),
        .hwrite    (hwrite[m]),
        .hsize     (hsize[m]),
        .hburst    (hburst[m]),
        .hprot     (hprot[m]),
        .hmastlock (hmastlock[m]),
        .hwdata    (hwdata[m]),
        .hrdata    (hrdata[m]),
        .hready    (hready[m]),
        .hresp     (hresp[m]),
        .sg_req    (d_req[m]),
        .sg_addr   (d_addr[m]),
        .sg_size   (d_size[m]),
        .sg_wnr    (d_wnr[m]),
        .sg_wdata  (d_wdata[m]),
        .sg_grant  (d_grant[m]),
        .sg_rdata  (d_rdata[m]),
        .sg_wait   (d_wait[m]),
        .sg_error  (d_error[m])
      );
      assign m_grant[m] = 1'b0;
      assign m_rdata[m] = '0;
      assign m_wait[m]  = 1'b0;
      assign m_error[m] = 1'b0;
    end else begin : g_native
      assign d_req[m]   = m_req[m];
      assign d_addr[m]  = m_addr[m];
      assign d_size[m]  = m_size[m];
      assign d_wnr[m]   = m_wnr[m];
      assign d_wdata[m] = m_wdata[m];
      assign m_grant[m] = d_grant[m];
      assign m_rdata[m] = d_rdata[m];
      assign m_wait[m]  = d_wait[m];
      assign m_error[m] = d_error[m];
      assign hrdata[m]  = '0;
      assign hready[m]  = 1'b1;
      assign hresp[m]   = 1'b0;
    end

    sgm_master_wrapper #(
      .ADDR_W (ADDR_W), .DATA_W (DATA_W), .SLOT_EN (EN), .SNOOP_EN (SNOOP_EN)
    ) u_mwrap (
      .clk     (sgclk),
      .rst_n   (sgresetn),
      .d_req   (d_req[m]),
      .d_addr  (d_addr[m]),
      .d_size  (d_size[m]),
      .d_wnr   (d_wnr[m]),
      .d_wdata (d_wdata[m]),
      .d_grant (d_grant[m]),
      .d_rdata (d_rdata[m]),
      .d_wait  (d_wait[m]),
      .d_error (d_error[m]),
      .s_req   (f_req[m]),
      .s_addr  (f_addr[m]),
      .s_size  (f_size[m]),
      .s_wnr   (f_wnr[m]),
      .s_wdata (f_wdata[m]),
      .s_grant (f_grant[m]),
      .s_rdata (f_rdata),
      .s_wait  (f_wait),
      .s_error (f_error),
      .s_snoop (f_snoop),
      .s_saddr (f_saddr),
      .s_ssize (f_ssize)
    );
  end

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    logic req_s   [NUM_MASTERS];
    logic grant_s [NUM_MASTERS];

    for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_slot
      assign req_s[m]      = f_req[m][s];
      assign f_grant[m][s] = grant_s[m];
    end

    sgm_slave_wrapper #(
      .NUM_SLOTS (NUM_MASTERS), .DYN_LEVELS (DYN_LEVELS),
      .ADDR_W    (ADDR_W),      .DATA_W     (DATA_W),
      .BYPASS_ARBITER (ARB_BYPASS && NUM_MASTERS == 1)
    ) u_swrap (
      .clk        (sgclk),
      .rst_n      (sgresetn),
      .m_req      (req_s),
      .m_addr     (f_addr),
      .m_size     (f_size),
      .m_wnr      (f_wnr),
      .m_wdata    (f_wdata),
      .m_grant    (grant_s),
      .b_rdata    (f_rdata[s]),
      .b_wait     (f_wait[s]),
      .b_error    (f_error[s]),
      .b_snoop    (f_snoop[s]),
      .b_saddr    (f_saddr[s]),
      .b_ssize    (f_ssize[s]),
      .s_activate (s_activate[s]),
      .s_addr     (s_addr[s]),
      .s_size     (s_size[s]),
      .s_wnr      (s_wnr[s]),
      .s_wdata    (s_wdata[s]),
      .s_rdata    (s_rdata[s]),
      .s_wait     (s_wait[s]),
      .s_error    (s_error[s]),
      .s_snoop    (s_snoop[s])
    );
  end

  // Slots above NUM_SLAVES have no slave wrapper.
  for (genvar s = NUM_SLAVES; s < NUM_SLOTS; s++) begin : g_empty
    assign f_rdata[s] = '0;
    assign f_wait[s]  = 1'b0;
    assign f_error[s] = 1'b0;
    assign f_snoop[s] = 1'b0;
    assign f_saddr[s] = '0;
    assign f_ssize[s] = '0;
    for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_slot
      assign f_grant[m][s] = 1'b0;
    end
  end

endmodule
