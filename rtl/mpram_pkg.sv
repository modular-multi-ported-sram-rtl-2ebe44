// mpram_pkg: types shared by the multi-ported memory and its parts.
//
// lvt_e selects how the invalidation live-value table (I-LVT) codes the
// identity of the bank that was written last: binary-coded (each LVT bank
// is ceil(log2 nW) bits wide) or one-hot-coded (each LVT bank is nW-1 bits
// wide and holds mutually exclusive condition bits). Both codings are the
// two special cases of the I-LVT method.
//
// byp_e selects what a read returns when it touches an address that was
// written very recently:
//   BYP_NON  a read issued in the cycle after a write may still return the
//            old value; a read issued in the same cycle returns the old value.
//   BYP_RAW  new data read-after-write: a read issued in the cycle after a
//            write returns the new value (as a single block RAM does).
//   BYP_RDW  new data read-during-write: a read issued in the same cycle as
//            the write already returns the new value (as a register does).
// The BYP_NON mode is a choice of this implementation, the two others follow
// the bypassing features of the method.
package mpram_pkg;

  typedef enum logic {
    LVT_BIN = 1'b0,
    LVT_1HT = 1'b1
  } lvt_e;

  typedef enum logic [1:0] {
    BYP_NON = 2'd0,
    BYP_RAW = 2'd1,
    BYP_RDW = 2'd2
  } byp_e;

  // Width of a bank index for nw banks (at least one bit).
  function automatic int unsigned bank_id_w(input int unsigned nw);
    return (nw > 1) ? $clog2(nw) : 1;
  endfunction

endpackage
