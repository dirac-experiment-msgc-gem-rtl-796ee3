// tb_msgc_pkg -- stimulus shared by the board-level testbenches. Pedestals
// and signals are defined per detector strip; a segment stream carries them
// in multiplexed order (VME strip i of segment s is detector strip
// msgc_pkg::vme_to_det_strip(128*s + i)), and the host loads the pedestals
// in that same multiplexed order. Pedestals lie in 20..59; about one strip
// in nine carries a signal of 40..100 counts, the rest 0..4 counts of
// noise, so that a threshold of 10 keeps only the hit strips.
package tb_msgc_pkg;
  import msgc_pkg::*;

  function automatic int det_strip(input int seg, input int idx);
    return int'(vme_to_det_strip(9'(seg * 128 + idx)));
  endfunction

  function automatic logic [7:0] ped_value(input int seg, input int idx);
    int d;
    d = det_strip(seg, idx);
    return 8'(20 + ((d * 29) % 40));
  endfunction

  function automatic int sig_value(input int ev, input int seg, input int idx);
    int d;
    d = det_strip(seg, idx);
    if ((d * 7 + ev * 3) % 9 == 0) return 40 + ((d + ev * 5) % 61);
    return (d + ev) % 5;
  endfunction

  function automatic logic [7:0] dph_value(input int ev, input int seg, input int idx);
    int v;
    v = int'(ped_value(seg, idx)) + sig_value(ev, seg, idx);
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction

  // pedestal-subtracted height the board computes for this strip
  function automatic logic [7:0] pph_value(input int ev, input int seg, input int idx);
    logic [7:0] d, p;
    d = dph_value(ev, seg, idx);
    p = ped_value(seg, idx);
    return (d > p) ? d - p : 8'd0;
  endfunction
endpackage
