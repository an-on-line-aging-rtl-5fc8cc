// Behavioural model (not synthesizable logic) of the on-line aging detection
// circuit.
//
// During every read the circuit watches the read current of each selected
// MTJ, turned into a voltage V_aged: an aged MTJ has a lower resistance and
// gives a lower voltage. Comparators against three voltage thresholds sort
// each cell into nominal, weak, strong or breakdown, and the word takes the
// level of its worst cell. The W and S outputs are the two flags of the
// detection-result table (W: aged at all, S: strongly aged).
//
// The model computes V_aged (in 0.1 mV) from the cell's AP resistance by
// piecewise-linear interpolation through the published corner points
// (4.10k/520, 3.91k/514, 3.01k/475, 2.87k/468, 2.05k/422 mV) and extends the
// end segments linearly. The thresholds are this design's choice: midway in
// the gaps between the published bands (517.0 and 471.5 mV) and, for
// breakdown, the extrapolated voltage at R_AP = 1/2 R_REF0 (419.2 mV).
//
// Interface: combinational; with det_en low every level is nominal.
module aging_detector
  import stt_aging_pkg::*;
#(
  parameter int unsigned WORD_W = 32,
  parameter int          V_W_TH = 5170,   // 0.1 mV, below: weak
  parameter int          V_S_TH = 4715,   // 0.1 mV, below: strong
  parameter int          V_B_TH = 4192    // 0.1 mV, below: breakdown
) (
  input  logic                   det_en,
  input  ohm_t [WORD_W-1:0]      mtj_rap,
  output logic [WORD_W-1:0][1:0] bit_level,
  output health_e                level,
  output logic                   w_flag,
  output logic                   s_flag
);

  // Corner points: resistance in ohm, voltage in 0.1 mV, ascending.
  localparam int NPT = 5;
  localparam int PT_R [NPT] = '{2050, 2870, 3010, 3910, 4100};
  localparam int PT_V [NPT] = '{4220, 4680, 4750, 5140, 5200};

  function automatic int v_aged(int r);
    int s;
    s = 0;
    for (int i = 1; i < NPT - 1; i++)
      if (r >= PT_R[i]) s = i;
    return PT_V[s] + ((r - PT_R[s]) * (PT_V[s+1] - PT_V[s])) / (PT_R[s+1] - PT_R[s]);
  endfunction

  function automatic health_e classify(int v);
    if (v < V_B_TH)      return H_BREAKDOWN;
    else if (v < V_S_TH) return H_STRONG;
    else if (v < V_W_TH) return H_WEAK;
    else                 return H_NOMINAL;
  endfunction

  always_comb begin
    health_e worst;
    health_e h;
    worst = H_NOMINAL;
    for (int b = 0; b < int'(WORD_W); b++) begin
      h = det_en ? classify(v_aged(int'(mtj_rap[b]))) : H_NOMINAL;
      bit_level[b] = h;
      if (h > worst) worst = h;
    end
    level  = worst;
    w_flag = (worst != H_NOMINAL);
    s_flag = (worst == H_STRONG) || (worst == H_BREAKDOWN);
  end

endmodule
