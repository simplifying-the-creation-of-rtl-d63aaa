// SG-Multi shared definitions.
//
// SG-Multi is a multi-bus on-chip interconnect: every master reaches every
// slave it is wired to over its own point-to-point path, and contention is
// resolved at each slave by slave-side arbitration. This package holds what
// the wrappers, arbiters and adapters share:
//   * the transaction-size encoding carried on SGSIZE (3 bits, 8..256 bits),
//   * the number of slave slots a master wrapper decodes (16, selected by the
//     top four address bits),
//   * the address/size comparison the master wrapper uses for bus snooping.
// The size codes, the 16 slots and the snoop-match rule follow the SG-Multi
// protocol; writing the match as a function is this implementation's choice.
package sgm_pkg;

  // Transaction size, SGSIZE[2:0]. Same code points as AHB HSIZE.
  typedef enum logic [2:0] {
    SZ_8   = 3'b000,
    SZ_16  = 3'b001,
    SZ_32  = 3'b010,
    SZ_64  = 3'b011,
    SZ_128 = 3'b100,
    SZ_256 = 3'b101
  } sg_size_e;

  // Master wrappers have 16 slave slots, chosen by the upper four address bits.
  localparam int unsigned SLOT_BITS = 4;
  localparam int unsigned NUM_SLOTS = 1 << SLOT_BITS;

  // Snooping state machine of the master wrapper.
  typedef enum logic [1:0] {
    SN_IDLE    = 2'd0,  // s0: wait for a lost read with SGSNOOP and SGWAIT
    SN_ANALYSE = 2'd1,  // s1: compare request with SGSADDR/SGSSIZE
    SN_WAIT    = 2'd2,  // s2: match found, slave still waiting
    SN_SNOOP   = 2'd3   // s3: last cycle of snooped transaction, forward data
  } snoop_state_e;

  // Snooping transaction match. The requested transaction (addr, size) can be
  // served by the current one (saddr, ssize) when the requested size is not
  // larger and both addresses agree once the top SLOT_BITS bits (slave select)
  // and the low log2(bytes of current transaction) bits are ignored.
  function automatic logic snoop_match(input logic [255:0] addr, input logic [2:0] size,
                                       input logic [255:0] saddr, input logic [2:0] ssize,
                                       input int unsigned aw);
    logic [255:0] keep;
    keep = '0;
    for (int unsigned i = 0; i < 256; i++)
      if (i >= 32'(ssize) && i < aw - SLOT_BITS) keep[i] = 1'b1;
    return (size <= ssize) && (((addr ^ saddr) & keep) == '0);
  endfunction

endpackage
