// SG-Multi master device wrapper.
//
// Connects one master device, which behaves as if it were the only master in
// the system, to up to 16 slave wrappers. It does two jobs:
//
// Signal routing. The top four bits of SGADDR pick one of 16 slave slots, so
// the address space is split into 16 equal blocks. Only SGREQ is decoded to
// the selected slot; SGADDR, SGSIZE, SGWnR and SGWDATA are broadcast to every
// slot, because each slave wrapper only listens to the master that won its
// arbitration. Responses are multiplexed back: during the address phase
// SGGRANT, SGWAIT and SGERROR come from the addressed slot; during the wait
// cycles of a data phase SGWAIT/SGERROR come from the slot that owns the data
// phase, and SGRDATA always does. The address phase and the data phase may
// therefore involve different slaves in the same cycle.
//
// Bus snooping. A read request that loses arbitration at a slave which has
// just accepted another master's snoopable (SGSNOOP) multi-cycle (SGWAIT)
// transaction can take its result instead of waiting. A four-state machine:
//   s0 idle     - on a lost read with SGSNOOP and SGWAIT go to s1.
//   s1 analyse  - first wait cycle of the other transaction: compare the
//                 request with SGSADDR/SGSSIZE (sgm_pkg::snoop_match).
//                 No match -> s0; match and slave still waiting -> s2;
//                 match and last cycle next -> s3.
//   s2 wait     - match found, slave still signalling SGWAIT.
//   s3 snoop    - last cycle of the snooped transaction; its SGRDATA goes to
//                 the master. A new lost snoopable read goes straight to s1.
// SGERROR in s1/s2 abandons the snoop (back to s0). SGGRANT is given to the
// master on the transition into s3, so the master sees an ordinary
// single-cycle data phase and cannot tell a snooped read from a won one.
//
// Timing: SGGRANT/SGWAIT/SGERROR/SGRDATA to the master are combinational from
// the slave wrappers; the master samples them at the rising edge.
//
// What follows the SG-Multi description: the 16 slots on the top four
// address bits, routing only SGREQ, the snooping preconditions, the four
// states and their transitions (including s3->s1), the comparison rules and
// SGGRANT on entry to s3. This implementation's choices: SLOT_EN to mark
// unconnected slots (a request to one is never granted), SNOOP_EN to build
// the wrapper without snooping, and the reset values.
module sgm_master_wrapper
  import sgm_pkg::*;
#(
  parameter int unsigned          ADDR_W   = 32,
  parameter int unsigned          DATA_W   = 32,
  parameter logic [NUM_SLOTS-1:0] SLOT_EN  = '1,
  parameter bit                   SNOOP_EN = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // master device interface
  input  logic                 d_req,
  input  logic [ADDR_W-1:0]    d_addr,
  input  logic [2:0]           d_size,
  input  logic                 d_wnr,
  input  logic [DATA_W-1:0]    d_wdata,
  output logic                 d_grant,
  output logic [DATA_W-1:0]    d_rdata,
  output logic                 d_wait,
  output logic                 d_error,
  // towards the slave wrappers: SGREQ decoded, the rest broadcast
  output logic                 s_req   [NUM_SLOTS],
  output logic [ADDR_W-1:0]    s_addr,
  output logic [2:0]           s_size,
  output logic                 s_wnr,
  output logic [DATA_W-1:0]    s_wdata,
  // from the slave wrappers, one entry per slot
  input  logic                 s_grant [NUM_SLOTS],
  input  logic [DATA_W-1:0]    s_rdata [NUM_SLOTS],
  input  logic                 s_wait  [NUM_SLOTS],
  input  logic                 s_error [NUM_SLOTS],
  input  logic                 s_snoop [NUM_SLOTS],
  input  logic [ADDR_W-1:0]    s_saddr [NUM_SLOTS],
  input  logic [2:0]           s_ssize [NUM_SLOTS]
);

  // Bus widths are powers of two from 32 to 256 bits.
  initial assert (ADDR_W inside {32, 64, 128, 256} && DATA_W inside {32, 64, 128, 256})
    else $error("address and data widths must be 32, 64, 128 or 256 bits");

  // --------------------------------------------------------- decoding
  logic [SLOT_BITS-1:0] aslot;
  logic                 slot_ok;
  logic                 rgrant;

  assign aslot   = d_addr[ADDR_W-1 -: SLOT_BITS];
  assign slot_ok = SLOT_EN[aslot];

  always_comb
    for (int k = 0; k < NUM_SLOTS; k++)
      s_req[k] = d_req && slot_ok && (aslot == SLOT_BITS'(k));

  assign s_addr  = d_addr;
  assign s_size  = d_size;
  assign s_wnr   = d_wnr;
  assign s_wdata = d_wdata;

  assign rgrant = d_req && slot_ok && s_grant[aslot];

  // ------------------------------------------------------ data phase
  logic                 dp_active;   // master is in a data phase
  logic                 wait_q;      // current cycle is a wait cycle
  logic [SLOT_BITS-1:0] dp_slot;     // slot owning the data phase
  logic                 sgrant;      // grant produced by a successful snoop

  assign d_grant = rgrant || sgrant;
  assign d_rdata = s_rdata[dp_slot];

  always_comb begin
    if (dp_active && wait_q) begin
      d_wait  = s_wait[dp_slot];
      d_error = s_error[dp_slot];
    end else if (rgrant) begin
      d_wait  = s_wait[aslot];
      d_error = s_error[aslot];
    end else begin
      d_wait  = 1'b0;
      d_error = 1'b0;
    end
  end

  // ------------------------------------------------------- snooping
  snoop_state_e         sn_state, sn_next;
  logic [SLOT_BITS-1:0] sn_slot;
  logic                 pre;         // snooping preconditions this cycle
  logic                 match;       // transaction comparison (s1)

  assign pre = SNOOP_EN && d_req && !d_wnr && slot_ok && !rgrant &&
               s_snoop[aslot] && s_wait[aslot];

  assign match = d_req && !d_wnr && (aslot == sn_slot) &&
                 snoop_match(256'(d_addr), d_size, 256'(s_saddr[sn_slot]),
                             s_ssize[sn_slot], ADDR_W);

  always_comb begin
    sn_next = sn_state;
    sgrant  = 1'b0;
    unique case (sn_state)
      SN_IDLE:    if (pre) sn_next = SN_ANALYSE;
      SN_ANALYSE: begin
        if (s_error[sn_slot] || !match) sn_next = SN_IDLE;
        else if (s_wait[sn_slot])       sn_next = SN_WAIT;
        else begin
          sn_next = SN_SNOOP;
          sgrant  = 1'b1;
        end
      end
      SN_WAIT: begin
        if (s_error[sn_slot] || !d_req) sn_next = SN_IDLE;
        else if (!s_wait[sn_slot])     begin
          sn_next = SN_SNOOP;
          sgrant  = 1'b1;
        end
      end
      SN_SNOOP:   sn_next = pre ? SN_ANALYSE : SN_IDLE;
      default:    sn_next = SN_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sn_state <= SN_IDLE;
      sn_slot  <= '0;
    end else begin
      sn_state <= sn_next;
      if (pre && (sn_state == SN_IDLE || sn_state == SN_SNOOP)) sn_slot <= aslot;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_active <= 1'b0;
      wait_q    <= 1'b0;
      dp_slot   <= '0;
    end else if (rgrant) begin
      dp_active <= 1'b1;
      wait_q    <= s_wait[aslot];
      dp_slot   <= aslot;
    end else if (sgrant) begin
      dp_active <= 1'b1;
      wait_q    <= 1'b0;
      dp_slot   <= sn_slot;
    end else if (dp_active && wait_q) begin
      wait_q    <= s_wait[dp_slot];
    end else begin
      dp_active <= 1'b0;
      wait_q    <= 1'b0;
    end
  end

  // ------------------------------------------- master-side protocol rules
  // A master holds SGREQ until it is granted.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (d_req && !d_grant) |=> d_req);
  // A master does not request during a wait cycle of its own data phase.
  a_no_req_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    d_req |-> !(dp_active && wait_q));

endmodule
