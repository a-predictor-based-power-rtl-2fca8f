// psp_pkg: types and constants shared by the predictor-based DRAM power-saving unit.
//
// Idle periods are not predicted in cycles but in "levels", ranges of idle length whose
// bounds x_i grow geometrically from the self-refresh threshold SRT, the shortest idle
// period for which self-refresh (with its 512-cycle power-up) costs less energy than
// power-down (with its 10-cycle power-up). Level 1 is [0, SRT-1] (self-refresh never pays),
// level 2 is [SRT, 2*SRT-1], and from level 3 on every upper bound is twice the previous
// one, so level 3 is [2*SRT, 4*SRT-2]. The last level is open-ended. level_lower() gives
// the lower bound x_(i-1) of level i, which is both the encoder's comparison threshold and
// the decoder's conservative forecast. The level ranges follow the document; treating the
// top level as saturating is this design's choice.
//
// SRT itself follows from equating the self-refresh and power-down energy over an idle
// period, given the currents I_DD6, I_DD2P0, I_DD2N and the two power-up latencies;
// srt_from_currents() evaluates that equation, rounded down, for reference. With the
// 1 Gb DDR3-800 figures (50, 12 and 6 mA, 512 and 10 cycles) it gives 3691.
package psp_pkg;

  // Levels are 1-based; 3 bits hold levels 1..7.
  localparam int unsigned LEVEL_W = 3;
  typedef logic [LEVEL_W-1:0] level_t;

  // State of the power-saving policy, also the DRAM power mode it requests.
  typedef enum logic [2:0] {
    PS_ACTIVE  = 3'd0,  // DRAM powered and available to the bus
    PS_TIMEOUT = 3'd1,  // idle, initial time-out running, speculative power-down
    PS_WAITPR  = 3'd2,  // time-out over, first forecast not ready yet, power-down
    PS_SR      = 3'd3,  // self-refresh
    PS_SREXIT  = 3'd4,  // leaving self-refresh, X_SDLL cycles
    PS_PD      = 3'd5,  // speculative power-down for cycles not covered by self-refresh
    PS_PDEXIT  = 3'd6   // leaving power-down, X_PDLL cycles
  } pwr_state_e;

  // Lower bound x_(lvl-1) of level lvl, in cycles.
  function automatic longint unsigned level_lower(input longint unsigned srt,
                                                  input int unsigned lvl);
    if (lvl <= 1) return 0;
    if (lvl == 2) return srt;
    return ((2 * srt - 1) << (lvl - 3)) + 1;
  endfunction

  // Self-refresh threshold from the datasheet currents (any common unit) and the two
  // power-up latencies in cycles, from E_SR(SRT) = E_PD(SRT). Rounded down.
  function automatic longint unsigned srt_from_currents(input longint unsigned idd2n,
                                                        input longint unsigned idd2p0,
                                                        input longint unsigned idd6,
                                                        input longint unsigned x_sdll,
                                                        input longint unsigned x_pdll);
    return (x_sdll * (idd2n - idd6) - x_pdll * (idd2n - idd2p0)) / (idd2p0 - idd6);
  endfunction

  // Cycles from the start pulse of pattern_predictor to its done pulse.
  function automatic int unsigned pred_latency(input int unsigned hl, input int unsigned pl);
    return hl - pl + 2;
  endfunction

endpackage
