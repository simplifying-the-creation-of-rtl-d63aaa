// Testbench for the snooping match rule sgm_pkg::snoop_match, for every
// transaction size from 8 to 256 bits and for 32- and 64-bit addresses.
// The reference is written as byte-range containment: with the slave-select
// bits removed, the bytes of the (size-aligned) requested transaction must lie
// inside the bytes of the current transaction, whose first byte is its
// address rounded down to its own size. Random pairs are drawn so that about
// half of them share the current transaction's aligned block.
module tb_sgm_snoop_match;
  import sgm_pkg::*;

  int checks = 0, failures = 0;

  function automatic bit ref_match(input longint unsigned a, input int size,
                                   input longint unsigned sa, input int ssize, input int aw);
    longint unsigned lo, base, mask_aw;
    mask_aw = (aw >= 64) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << aw) - 1);
    mask_aw = mask_aw >> SLOT_BITS;        // drop the slave-select bits
    lo   = a & mask_aw;
    base = (sa & mask_aw) & ~((64'd1 << ssize) - 1);
    return (lo >= base) && (lo + (64'd1 << size) <= base + (64'd1 << ssize));
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int aw, size, ssize;
      longint unsigned a, sa;
      bit got, exp;
      aw    = ($urandom_range(1, 0) == 1) ? 64 : 32;
      size  = $urandom_range(5, 0);
      ssize = $urandom_range(5, 0);
      sa = {$urandom, $urandom};
      if (aw == 32) sa = sa & 64'hFFFF_FFFF;
      if ($urandom_range(1, 0) == 1) begin
        // inside the current transaction's aligned block, other slave bits
        a = (sa & ~((64'd1 << ssize) - 1)) + 64'($urandom_range(255, 0) % (1 << ssize));
        a[aw - 1 -: 4] = 4'($urandom);
      end else begin
        a = {$urandom, $urandom};
        if (aw == 32) a = a & 64'hFFFF_FFFF;
      end
      a = a & ~((64'd1 << size) - 1);     // requests are aligned to their size
      exp = ref_match(a, size, sa, ssize, aw);
      got = snoop_match(256'(a), 3'(size), 256'(sa), 3'(ssize), aw);
      checks++;
      if (got !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL aw=%0d req %h/%0d cur %h/%0d: got %0b expected %0b",
                   aw, a, size, sa, ssize, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
