// adaptive_voter: majority voter that follows the position of the redundant
// domains.
//
// For every sub-band SBj it finds, from the SBO fields, the zones that hold
// SBj and are in service (zone_ok: loaded and settled after a rewrite). With
// voting enabled and three such zones it forwards the bundle two of them agree
// on and raises flag_set for the zone that disagrees; with two zones (duplex)
// it forwards the first and, on a mismatch, flags both, since a duplex can
// detect a fault but not locate it. If all three disagree it forwards the
// first and flags all three. Bundles are compared whole (valid, count and
// every carrier) on every clock, so a replica that is late or silent is a
// mismatch too. With fewer than two zones in service, or with voting
// disabled (voting by configuration readback in software instead), the
// selector's choice sel_out passes unchanged and nothing is flagged.
//
// Purely combinational; flag_set is meant to set the flag register bits. The
// adaptive position, the masking and the flagging are the document's; the
// duplex policy is this design's.
module adaptive_voter
  import demux_pkg::*;
(
  input  logic            vote_en,
  input  logic [SB_W-1:0] zone_sb  [NUM_ZONES],
  input  logic            zone_ok  [NUM_ZONES],
  input  carriers_t       zone_out [NUM_ZONES],
  input  carriers_t       sel_out  [NUM_SB],
  output carriers_t       sb_out   [NUM_SB],
  output logic [NUM_ZONES-1:0] flag_set
);

  always_comb begin
    flag_set = '0;
    for (int j = 0; j < NUM_SB; j++) begin
      int n;
      int r [3];
      logic ab, ac, bc;
      ab = 1'b0;
      ac = 1'b0;
      bc = 1'b0;
      n    = 0;
      r[0] = 0;
      r[1] = 0;
      r[2] = 0;
      for (int z = 0; z < NUM_ZONES; z++) begin
        if (zone_sb[z] == SB_W'(j + 1) && zone_ok[z] && n < 3) begin
          r[n] = z;
          n++;
        end
      end
      sb_out[j] = sel_out[j];
      if (vote_en && n == 2) begin
        sb_out[j] = zone_out[r[0]];
        if (zone_out[r[0]] != zone_out[r[1]]) begin
          flag_set[r[0]] = 1'b1;
          flag_set[r[1]] = 1'b1;
        end
      end else if (vote_en && n == 3) begin
        ab = (zone_out[r[0]] == zone_out[r[1]]);
        ac = (zone_out[r[0]] == zone_out[r[2]]);
        bc = (zone_out[r[1]] == zone_out[r[2]]);
        sb_out[j] = zone_out[r[0]];
        if (ab) begin
          if (!ac) flag_set[r[2]] = 1'b1;
        end else if (ac) begin
          flag_set[r[1]] = 1'b1;
        end else if (bc) begin
          sb_out[j] = zone_out[r[1]];
          flag_set[r[0]] = 1'b1;
        end else begin
          flag_set[r[0]] = 1'b1;
          flag_set[r[1]] = 1'b1;
          flag_set[r[2]] = 1'b1;
        end
      end
    end
  end

endmodule
