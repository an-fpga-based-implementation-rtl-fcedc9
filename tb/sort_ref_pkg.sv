// sort_ref_pkg - reference model for the trigger-object sort testbenches.
// top4() returns the four highest-rank objects of a list, highest first,
// earlier entries winning ties, by repeated maximum search (independent of
// the comparison-count method of the RTL).
package sort_ref_pkg;
  import gct_pkg::*;

  typedef obj_t obj_q_t [$];

  function automatic void top4(input obj_q_t lst, output obj_t res [4]);
    bit used [$];
    foreach (lst[i]) used.push_back(1'b0);
    for (int k = 0; k < 4; k++) begin
      int best;
      best = -1;
      foreach (lst[i])
        if (!used[i] && (best < 0 || lst[i].rank > lst[best].rank)) best = i;
      if (best >= 0) begin
        res[k] = lst[best];
        used[best] = 1'b1;
      end else res[k] = '0;
    end
  endfunction

  function automatic obj_t rand_obj(input int max_rank);
    obj_t o;
    o.rank = RANK_W'($urandom_range(max_rank));
    o.eta  = ETA_W'($urandom_range(21));
    o.phi  = PHI_W'($urandom_range(17));
    return o;
  endfunction
endpackage
