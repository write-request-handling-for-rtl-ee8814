// wl_ref_pkg: reference model of the wear-leveling write path for testbenches.
//
// The model works on whole requests, independently of the RTL's states:
// it keeps per-physical-block write counts, the logical-to-physical links,
// the used bits and a shadow copy of every logical byte written. For each
// write request it predicts the outcome (written in place, written after a
// swap into an empty or an occupied fresh block, or missed), the states
// the controller must pass through and the request's latency in cycles
// from the accepting clock edge to the edge that raises wr_done/wr_missed.
package wl_ref_pkg;

  typedef enum int {IN_PLACE, SWAP_EMPTY, SWAP_DUMMY, MISS} outcome_e;

  class wl_ref;
    int          bb;         // bytes per block
    int          sat;        // saturation level
    int          cnt  [4];
    int          link [4];
    bit          used [4];
    byte         data [];    // logical shadow, index L*bb + off
    bit          valid [];
    bit          redirected; // last request followed a LINK != ID

    function new(int block_bytes, int sat_level);
      bb  = block_bytes;
      sat = sat_level;
      data  = new[4 * bb];
      valid = new[4 * bb];
      for (int i = 0; i < 4; i++) begin
        cnt[i] = 0; link[i] = i; used[i] = 1'b0;
      end
    endfunction

    // Apply one write to logical block l, offset off. Returns the outcome;
    // lat is the expected latency and path the expected state set as a bit
    // mask over state numbers 1..10.
    function outcome_e write(int l, int off, byte d, output int lat, output int path);
      int p, f, best, m;
      outcome_e o;
      p = link[l];
      redirected = (p != l);
      lat  = redirected ? 6 : 5;
      path = (1 << 1) | (1 << 2) | (1 << 4) | (1 << 5) | (redirected ? (1 << 3) : 0);
      if (cnt[p] < sat) begin
        o = IN_PLACE;
        path |= (1 << 10);
      end else begin
        f = -1; best = 1 << 30;
        for (int i = 0; i < 4; i++)
          if (i != p && cnt[i] < best) begin best = cnt[i]; f = i; end
        if (best >= sat) begin
          lat -= 1;
          return MISS;
        end
        m = 0;
        for (int i = 0; i < 4; i++) if (link[i] == f) m = i;
        path |= (1 << 6) | (1 << 8) | (1 << 10);
        if (used[f]) begin
          o = SWAP_DUMMY;
          path |= (1 << 7) | (1 << 9);
          lat += 1 + 3 * bb;
        end else begin
          o = SWAP_EMPTY;
          lat += 1 + bb;
        end
        begin
          bit t;
          t = used[p]; used[p] = used[f]; used[f] = t;
        end
        link[l] = f; link[m] = p;
        p = f;
      end
      cnt[p]++;
      used[p] = 1'b1;
      data[l * bb + off]  = d;
      valid[l * bb + off] = 1'b1;
      return o;
    endfunction
  endclass

endpackage
