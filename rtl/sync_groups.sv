// sync_groups: keeps the output ports of one sync group in step.
//
// Each output port belongs to the groups set in its one-hot member mask
// (the tile's strg_ub_sync_grp_sync_group registers). A port may emit a word
// only when every port sharing a group with it is requested (`ren`) and has a
// word ready (`avail`), so ports of a group emit their words in the same
// cycles. A port in no group moves on its own. Purely combinational. The
// member-mask encoding is this design's own reading of the register name.
module sync_groups #(
  parameter int unsigned PORTS  = 2,
  parameter int unsigned GROUPS = 2
) (
  input  logic [PORTS-1:0][GROUPS-1:0] member,
  input  logic [PORTS-1:0]             ren,
  input  logic [PORTS-1:0]             avail,
  output logic [PORTS-1:0]             go,
  output logic [PORTS-1:0]             held      // requested and ready, but waiting for the group
);

  logic [PORTS-1:0] ok;

  always_comb begin
    ok = ren & avail;
    for (int p = 0; p < int'(PORTS); p++) begin
      go[p] = ok[p];
      for (int q = 0; q < int'(PORTS); q++)
        if ((member[p] & member[q]) != '0 && !ok[q]) go[p] = 1'b0;
      held[p] = ok[p] && !go[p];
    end
  end

endmodule
