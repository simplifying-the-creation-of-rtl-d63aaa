// Behavioural SG-Multi slave: a small memory with a fixed number of wait
// cycles per transaction, used by the testbenches in place of the SRAM
// controller and the other slave devices.
//
// Protocol as seen by the wrapper: in the address-phase cycle (SGACTIVATE)
// the model answers combinationally with SGWAIT (WAIT > 0), SGSNOOP (reads,
// when SNOOP is set) and, for an address with bit ERR_BIT set and WAIT = 0,
// an immediate SGERROR that rejects the transfer. The data phase then lasts
// WAIT + 1 cycles: SGWAIT stays high at the edges that start wait cycles and
// drops for the final one; an erroring transfer with WAIT > 0 drops SGWAIT
// and raises SGERROR for its final cycle. Read data is the addressed word
// (the whole aligned 32-bit word, lanes are the master's business); write
// data is taken, lane by lane, at the end of the final cycle.
// Initial contents come from sgm_tb_pkg::pattern().
module sgm_mem_slave_model #(
  parameter int unsigned WAIT    = 3,
  parameter bit          SNOOP   = 1'b1,
  parameter int unsigned ERR_BIT = 27,
  parameter int unsigned WORDS   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        activate,
  input  logic [31:0] addr,
  input  logic [2:0]  size,
  input  logic        wnr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        wait_o,
  output logic        error_o,
  output logic        snoop_o
);
  import sgm_tb_pkg::*;

  logic [31:0] mem [WORDS];
  logic        written [WORDS];
  logic        dp, wait_q, err_q, wnr_q;
  logic [31:0] a_q;
  logic [2:0]  sz_q;
  int unsigned cnt;
  logic        err_now;
  int unsigned idx;

  // statistics for the testbenches
  int unsigned n_txn, n_err;

  assign err_now = addr[ERR_BIT];
  assign idx     = (a_q >> 2) % WORDS;

  function automatic logic [31:0] word(input logic [31:0] a);
    int unsigned i;
    i = (a >> 2) % WORDS;
    return written[i] ? mem[i] : pattern({a[31:2], 2'b00});
  endfunction

  always_comb begin
    wait_o  = 1'b0;
    error_o = 1'b0;
    snoop_o = 1'b0;
    if (activate) begin
      wait_o  = (WAIT > 0);
      error_o = (WAIT == 0) && err_now;
      snoop_o = SNOOP && !wnr && !err_now;
    end else if (dp && wait_q) begin
      wait_o  = (cnt > 0);
      error_o = (cnt == 0) && err_q;
    end
  end

  assign rdata = word(a_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp     <= 1'b0;
      wait_q <= 1'b0;
      err_q  <= 1'b0;
      wnr_q  <= 1'b0;
      a_q    <= '0;
      sz_q   <= '0;
      cnt    <= 0;
      n_txn  <= 0;
      n_err  <= 0;
      for (int i = 0; i < WORDS; i++) written[i] <= 1'b0;
    end else begin
      if (dp && !wait_q) begin
        // final cycle of the data phase
        if (err_q) n_err <= n_err + 1;
        else if (wnr_q) begin
          mem[idx]     <= (word(a_q) & ~lane_mask(a_q, sz_q)) | (wdata & lane_mask(a_q, sz_q));
          written[idx] <= 1'b1;
        end
        dp <= 1'b0;
      end
      if (activate) begin
        dp     <= 1'b1;
        n_txn  <= n_txn + 1;
        a_q    <= addr;
        sz_q   <= size;
        wnr_q  <= wnr;
        err_q  <= err_now;
        wait_q <= (WAIT > 0);
        cnt    <= (WAIT > 0) ? WAIT - 1 : 0;
      end else if (dp && wait_q) begin
        wait_q <= (cnt > 0);
        if (cnt > 0) cnt <= cnt - 1;
      end
    end
  end

endmodule
