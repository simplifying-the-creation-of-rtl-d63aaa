// Behavioural AHB-Lite master for the SG-Multi testbenches (stands in for a
// Cortex-M0 data port). The testbench pushes transfers with push(); the model
// issues them back to back in pipelined fashion (address phase of the next
// transfer during the data phase of the current one), honours HREADY, and
// checks read data on the active byte lanes and the HRESP error response
// (two cycles: HREADY low then high) against what each transfer expects.
// A transfer's gap field inserts idle cycles before its address phase.
module sgm_ahb_master_model (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic        hresp
);
  import sgm_tb_pkg::*;

  ahb_op_t     q [$];
  ahb_op_t     a_op, d_op;
  logic        a_v, d_v;
  int unsigned gap_cnt;

  int unsigned n_done, n_checks, n_fail, n_err_seen, n_stall;
  longint      last_done_cycle;
  longint      cyc;

  function automatic void push(input ahb_op_t op);
    q.push_back(op);
  endfunction

  function automatic bit idle();
    return (q.size() == 0) && !a_v && !d_v;
  endfunction

  assign htrans = a_v ? 2'b10 : 2'b00;
  assign haddr  = a_v ? a_op.addr : '0;
  assign hwrite = a_v && a_op.write;
  assign hsize  = a_v ? a_op.size : 3'b010;
  assign hwdata = d_v ? d_op.wdata : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v <= 1'b0; d_v <= 1'b0; gap_cnt <= 0;
      n_done <= 0; n_checks <= 0; n_fail <= 0; n_err_seen <= 0; n_stall <= 0;
      cyc <= 0; last_done_cycle <= 0;
    end else begin
      cyc <= cyc + 1;
      if (!hready) n_stall <= n_stall + 1;
      if (hready) begin
        // data phase completes
        if (d_v) begin
          n_done <= n_done + 1;
          last_done_cycle <= cyc;
          n_checks <= n_checks + 1;
          if (hresp !== d_op.exp_err) begin
            n_fail <= n_fail + 1;
            $display("AHB %m: addr %h error response %0b, expected %0b", d_op.addr, hresp, d_op.exp_err);
          end
          if (hresp) n_err_seen <= n_err_seen + 1;
          if (!d_op.write && d_op.check && !d_op.exp_err) begin
            n_checks <= n_checks + 2;
            if (((hrdata ^ d_op.exp) & lane_mask(d_op.addr, d_op.size)) != 0) begin
              n_fail <= n_fail + 1;
              $display("AHB %m: read %h got %h expected %h", d_op.addr, hrdata, d_op.exp);
            end
          end
        end
        d_v  <= a_v;
        d_op <= a_op;
        // next address phase
        if (q.size() != 0 && gap_cnt >= int'(q[0].gap)) begin
          a_op    <= q.pop_front();
          a_v     <= 1'b1;
          gap_cnt <= 0;
        end else begin
          a_v <= 1'b0;
          if (q.size() != 0) gap_cnt <= gap_cnt + 1;
        end
      end
    end
  end

endmodule
