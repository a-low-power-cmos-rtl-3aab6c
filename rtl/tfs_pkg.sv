// tfs_pkg: types and helpers shared by the TFS imager modules.
//
// The pixel walks through three states per frame: it integrates after the
// global start, it requests the AER after its first (and only) spike, and it
// sits in stand-by after it has been read and has reset itself. The helper
// clog_r gives the depth of an arbiter tree of a given radix.
package tfs_pkg;

  typedef enum logic [1:0] {
    PX_STANDBY   = 2'd0,  // read out and self-reset, waits for the next start
    PX_INTEGRATE = 2'd1,  // photodiode discharging, no event yet
    PX_FIRED     = 2'd2   // event generated, requesting row then column
  } pixel_state_e;

  // Smallest L >= 1 with r**L >= n: depth of a radix-r tree with n leaves.
  function automatic int unsigned clog_r(int unsigned n, int unsigned r);
    int unsigned l = 1;
    longint unsigned p = longint'(r);
    while (p < longint'(n)) begin
      p = p * longint'(r);
      l++;
    end
    return l;
  endfunction

endpackage
