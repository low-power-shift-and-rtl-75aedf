// scan_seg_pkg -- partitioning arithmetic shared by the segmented scan chain and its top.
//
// The scan flops of a design are first split into balanced chains, and every chain is
// then split evenly into segments. Both splits use the same rule: part i of n, cut out of
// a total of t items, starts at floor(i*t/n). Lengths therefore differ by at most one,
// and the longer parts come later. For a 5-flop chain cut in two this gives 2 and 3
// cells, the split of the two-segment example chain; for 5364 flops in 5 chains it gives
// 1072 and 1073, the balanced chain lengths quoted for the largest benchmark. The rule
// itself (which parts get the extra item) is this design's choice.
//
// Each segment carries one EECB (Embedded Enable Capture Bit) in front of its first flop,
// so a chain of L flops and S segments is L+S cells long and needs L+S shift cycles.
package scan_seg_pkg;

  // First item of part `idx` when `total` items are split into `parts` parts.
  function automatic int part_start(int idx, int total, int parts);
    return (idx * total) / parts;
  endfunction

  // Number of items in part `idx`.
  function automatic int part_len(int idx, int total, int parts);
    return part_start(idx + 1, total, parts) - part_start(idx, total, parts);
  endfunction

  // Scan cells in a chain of `chain_len` flops with `num_segs` EECBs, which is also the
  // number of shift cycles needed to load or unload it.
  function automatic int shift_cycles(int chain_len, int num_segs);
    return chain_len + num_segs;
  endfunction

endpackage
