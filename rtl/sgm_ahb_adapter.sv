// AHB-Lite to SG-Multi bus adapter.
//
// Lets an unmodified AHB-Lite master (the reference systems use ARM
// Cortex-M0 cores) sit in front of an SG-Multi master wrapper. The adapter is
// the AHB-Lite master's only slave.
//
// How it works: an AHB-Lite address phase (HTRANS NONSEQ or SEQ while HREADY
// is high) is turned into an SG-Multi request in the same cycle, with HADDR,
// HSIZE and HWRITE passed straight through (HSIZE and SGSIZE share their
// encoding). If SGGRANT arrives in that cycle, both buses enter the data phase
// together and no cycle is added. If not, the request is held in a register
// (state PEND) and HREADY stays low until the grant arrives. In the data
// phase SG-Multi reports each cycle's status in advance (SGWAIT sampled at the
// rising edge says whether the cycle now starting is a wait cycle), while
// AHB-Lite reports it at the end of the cycle; the adapter registers SGWAIT and
// SGERROR and drives HREADY high exactly in the final SG-Multi data cycle.
// SGERROR is turned into the two-cycle AHB-Lite error response: the final SG
// cycle gives HRESP=1 with HREADY low, and the next cycle HRESP=1 with HREADY
// high. HRDATA is SGRDATA and SGWDATA is HWDATA, both passed through.
//
// Interface: AHB-Lite slave side (HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT,
// HMASTLOCK, HWDATA in; HRDATA, HREADY, HRESP out) and SG-Multi master side.
// HBURST, HPROT and HMASTLOCK have no SG-Multi counterpart and are not used;
// bursts become single transfers. AHB and SG-Multi widths are the same here.
//
// The adapter's existence, its place between the master and its wrapper, its
// native signal list and the aim of adding no latency follow the SG-Multi
// description; its internal structure is this implementation's own.
module sgm_ahb_adapter #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // AHB-Lite (from the master)
  input  logic [ADDR_W-1:0] haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [2:0]        hburst,
  input  logic [3:0]        hprot,
  input  logic              hmastlock,
  input  logic [DATA_W-1:0] hwdata,
  output logic [DATA_W-1:0] hrdata,
  output logic              hready,
  output logic              hresp,
  // SG-Multi master interface (to the master wrapper)
  output logic              sg_req,
  output logic [ADDR_W-1:0] sg_addr,
  output logic [2:0]        sg_size,
  output logic              sg_wnr,
  output logic [DATA_W-1:0] sg_wdata,
  input  logic              sg_grant,
  input  logic [DATA_W-1:0] sg_rdata,
  input  logic              sg_wait,
  input  logic              sg_error
);

  typedef enum logic [1:0] {
    A_IDLE = 2'd0,  // no AHB transfer outstanding
    A_PEND = 2'd1,  // AHB transfer accepted, waiting for SGGRANT
    A_DATA = 2'd2,  // SG-Multi data phase in progress
    A_ERR2 = 2'd3   // second cycle of the AHB error response
  } ad_state_e;

  ad_state_e         st;
  logic              wait_q, err_q;
  logic [ADDR_W-1:0] p_addr;
  logic [2:0]        p_size;
  logic              p_wnr;
  logic              accept;     // AHB address phase completes this cycle

  // AHB side status for the current cycle.
  always_comb begin
    hready = 1'b1;
    hresp  = 1'b0;
    unique case (st)
      A_IDLE: ;
      A_PEND: hready = 1'b0;
      A_DATA: begin
        hready = !wait_q && !err_q;
        hresp  = !wait_q && err_q;
      end
      A_ERR2: hresp = 1'b1;
      default: ;
    endcase
  end

  assign accept = hready && htrans[1];

  // SG-Multi request: held one from PEND, else the AHB address phase itself.
  always_comb begin
    if (st == A_PEND) begin
      sg_req  = 1'b1;
      sg_addr = p_addr;
      sg_size = p_size;
      sg_wnr  = p_wnr;
    end else begin
      sg_req  = accept;
      sg_addr = haddr;
      sg_size = hsize;
      sg_wnr  = hwrite;
    end
  end

  assign sg_wdata = hwdata;
  assign hrdata   = sg_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= A_IDLE;
      wait_q <= 1'b0;
      err_q  <= 1'b0;
      p_addr <= '0;
      p_size <= '0;
      p_wnr  <= 1'b0;
    end else begin
      if (sg_req && sg_grant) begin
        st     <= A_DATA;
        wait_q <= sg_wait;
        err_q  <= sg_error;
      end else if (accept) begin
        st     <= A_PEND;
        p_addr <= haddr;
        p_size <= hsize;
        p_wnr  <= hwrite;
      end else if (st == A_DATA && wait_q) begin
        wait_q <= sg_wait;
        err_q  <= sg_error;
      end else if (st == A_DATA && err_q) begin
        st     <= A_ERR2;
        err_q  <= 1'b0;
      end else if (st != A_PEND) begin
        st     <= A_IDLE;
      end
    end
  end

  // HBURST, HPROT and HMASTLOCK carry nothing SG-Multi can express.
  logic unused_ok;
  assign unused_ok = ^{hburst, hprot, hmastlock, htrans[0]};

endmodule
