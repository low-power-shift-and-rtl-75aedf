// seg_chain_model_pkg -- cycle-level reference model of one EECB-segmented scan chain.
//
// The model keeps the chain as a plain bit array in scan order (position 0 is the cell
// nearest the scan input). Segment s of a chain of `len` flops and `nsegs` segments
// covers flops floor(s*len/nsegs) .. floor((s+1)*len/nsegs)-1; its EECB sits just in
// front of them, so EECB s is at position floor(s*len/nsegs)+s and flop i of segment s at
// position i+s+1. A shift clock moves every cell one place towards the scan output. A
// capture clock (scan enable low) loads a flop from its functional input when the
// global enable or its segment's EECB is 1; EECBs never change on a capture clock.
package seg_chain_model_pkg;

  class seg_chain_model;
    int len, nsegs, ncells;
    bit st[];
    int eecb_pos[];
    int flop_pos[];
    int flop_seg[];

    function new(int len, int nsegs);
      this.len    = len;
      this.nsegs  = nsegs;
      this.ncells = len + nsegs;
      st       = new[ncells];
      eecb_pos = new[nsegs];
      flop_pos = new[len];
      flop_seg = new[len];
      for (int s = 0; s < nsegs; s++) begin
        int first = (s * len) / nsegs;
        int last  = ((s + 1) * len) / nsegs;
        eecb_pos[s] = first + s;
        for (int i = first; i < last; i++) begin
          flop_pos[i] = i + s + 1;
          flop_seg[i] = s;
        end
      end
      reset();
    endfunction

    function void reset();
      foreach (st[p]) st[p] = 1'b0;
    endfunction

    function bit so();
      return st[ncells-1];
    endfunction

    function bit q(int i);
      return st[flop_pos[i]];
    endfunction

    function bit eecb(int s);
      return st[eecb_pos[s]];
    endfunction

    function bit seg_enabled(int s, bit en_or_se);
      return en_or_se | eecb(s);
    endfunction

    // One clock with scan enable high.
    function void shift(bit si);
      for (int p = ncells - 1; p > 0; p--) st[p] = st[p-1];
      st[0] = si;
    endfunction

    // One clock with scan enable low; d[i] is the functional input of flop i.
    // Returns the number of flops whose value changed.
    function int capture(bit enable, bit d[]);
      bit en_seg[];
      int toggles;
      en_seg  = new[nsegs];
      toggles = 0;
      for (int s = 0; s < nsegs; s++) en_seg[s] = enable | eecb(s);
      for (int i = 0; i < len; i++) begin
        if (en_seg[flop_seg[i]]) begin
          if (st[flop_pos[i]] != d[i]) toggles++;
          st[flop_pos[i]] = d[i];
        end
      end
      return toggles;
    endfunction
  endclass

endpackage
