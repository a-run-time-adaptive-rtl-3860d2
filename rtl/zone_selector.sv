// zone_selector: adaptive placement of sub-bands in reconfiguration zones.
//
// The sub-band order (SBO) register gives, for every zone, which sub-band it
// holds (zone_sb[z] = 1..4 for SB1..SB4, 0 for none; 5..7 count as none).
// Forward direction: each zone receives the STR10 stream of the sub-band it
// holds, so one sub-band can be sent to two or three zones at once (duplex or
// TMR). Return direction: for each sub-band output SBj_out the selector picks
// a replica: the lowest-numbered zone that holds SBj or, when the SBO spare
// bit is set and a second replica exists, the next one. A sub-band that no
// zone holds delivers an all-zero bundle. It also reports how many zones hold
// each sub-band.
//
// Purely combinational. The routing rules and the all-zero output follow the
// document; the field encoding and the meaning of the spare bit as "take the
// next replica" are this design's reading.
module zone_selector
  import demux_pkg::*;
(
  input  logic [SB_W-1:0] zone_sb       [NUM_ZONES],
  input  logic            spare,
  input  logic            sb_valid,
  input  cplx_t           sb_in         [NUM_SB],
  output logic            zone_in_valid [NUM_ZONES],
  output cplx_t           zone_in       [NUM_ZONES],
  input  carriers_t       zone_out      [NUM_ZONES],
  output carriers_t       sel_out       [NUM_SB],
  output logic [2:0]      replicas      [NUM_SB]
);

  always_comb begin
    for (int z = 0; z < NUM_ZONES; z++) begin
      zone_in_valid[z] = 1'b0;
      zone_in[z]       = '0;
      for (int j = 0; j < NUM_SB; j++) begin
        if (zone_sb[z] == SB_W'(j + 1)) begin
          zone_in_valid[z] = sb_valid;
          zone_in[z]       = sb_in[j];
        end
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NUM_SB; j++) begin
      int n;
      n          = 0;
      sel_out[j] = '0;
      for (int z = 0; z < NUM_ZONES; z++) begin
        if (zone_sb[z] == SB_W'(j + 1)) begin
          if (n == 0 || (n == 1 && spare)) sel_out[j] = zone_out[z];
          n++;
        end
      end
      replicas[j] = 3'(n);
    end
  end

endmodule
