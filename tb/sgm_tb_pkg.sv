// Shared testbench definitions for the SG-Multi testbenches.
//
// pattern() gives the initial contents of every simulated memory word, so a
// reader of a never-written word knows the expected value without looking at
// the memory model. lane_mask() gives the active byte lanes of a transfer on
// a 32-bit data bus (8-bit transfers use the lane of address offset 0..3,
// 16-bit transfers the lower or upper half, 32-bit all four lanes).
package sgm_tb_pkg;

  typedef struct packed {
    logic [31:0] addr;
    logic [2:0]  size;
    logic        write;
    logic [31:0] wdata;
    logic        check;      // compare read data with exp
    logic [31:0] exp;        // expected read data (active lanes only)
    logic        exp_err;    // error response expected
    logic [7:0]  gap;        // idle cycles before the address phase
  } ahb_op_t;

  function automatic logic [31:0] pattern(input logic [31:0] addr);
    logic [31:0] w;
    w = {addr[31:2], 2'b00};
    return (w * 32'h9E37_79B1) ^ {w[15:0], w[31:16]};
  endfunction

  function automatic logic [31:0] lane_mask(input logic [31:0] addr, input logic [2:0] size);
    case (size)
      3'b000:  return 32'hFF << (8 * addr[1:0]);
      3'b001:  return addr[1] ? 32'hFFFF_0000 : 32'h0000_FFFF;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

endpackage
