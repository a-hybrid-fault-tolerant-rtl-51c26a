// hft_pkg: types and helpers shared by the hybrid fault tolerant architecture.
//
// The architecture holds three copies of one combinational logic circuit (LC1, LC2,
// LC3) of which two run at a time. A "configuration" names the running pair: 1-2, 2-3
// or 3-1. Configurations are visited in the cyclic order 1-2 -> 2-3 -> 3-1 -> 1-2, the
// order the reconfiguration examples of the architecture follow. The two error
// policies of the configuration FSM are FSM1 (retry once on the same pair, then
// reconfigure) and FSM2 (reconfigure on every error). The enum encodings are this
// design's own choice.
package hft_pkg;

  // Running pair of logic circuits.
  typedef enum logic [1:0] {
    CFG_12 = 2'd0,  // LC1 and LC2 run, LC3 in standby
    CFG_23 = 2'd1,  // LC2 and LC3 run, LC1 in standby
    CFG_31 = 2'd2   // LC3 and LC1 run, LC2 in standby
  } cfg_e;

  // Error policy of the configuration FSM.
  typedef enum logic {
    POL_FSM1 = 1'b0,  // keep the pair on a first error, reconfigure on the second in a row
    POL_FSM2 = 1'b1   // reconfigure on every detected error
  } policy_e;

  // Next configuration in the cyclic order 1-2 -> 2-3 -> 3-1 -> 1-2.
  function automatic cfg_e next_cfg(cfg_e c);
    case (c)
      CFG_12:  return CFG_23;
      CFG_23:  return CFG_31;
      default: return CFG_12;
    endcase
  endfunction

  // True when logic circuit lc (0, 1 or 2 for LC1, LC2, LC3) runs in configuration c.
  function automatic logic lc_running(cfg_e c, int unsigned lc);
    case (c)
      CFG_12:  return lc != 2;
      CFG_23:  return lc != 0;
      default: return lc != 1;
    endcase
  endfunction

endpackage
