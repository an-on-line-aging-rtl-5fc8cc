// Behavioural model (not synthesizable logic) of the STT-MRAM cell array
// with its row/column decoders and write drivers.
//
// Every cell is one access transistor and one MTJ. Writing '1' drives the
// source line high and the bit line low and leaves the MTJ anti-parallel
// (AP, high resistance); writing '0' reverses the current and leaves it
// parallel (P, low resistance); a read puts V_read on the bit line and
// grounds the source line. The write drivers and the read bias produce these
// levels per column (wl, bl_drv, sl_drv), and a cell changes state from the
// direction of the current between its lines, as a real MTJ does; idle
// lines are held at ground. The model keeps, per cell, the stored state
// and the two resistances the MTJ currently has. Aging (TDDB pinholes) lowers
// both resistances; the age_* port stands for that wear-out process: it sets
// one MTJ's resistances to the values the pinhole model yields for the defect
// size a testbench wants.
//
// Interface: a write (en & we) stores wdata at addr on the rising clock
// edge. While en is high and we low, the selected word is read: bl_res gives
// the resistance each cell presents to its bit line (R_AP for a stored 1,
// R_P for a stored 0) and mtj_rap the cell's AP resistance, the quantity the
// detection circuit watches. Both follow addr combinationally; while idle
// they are 0. The array is WORDS words of WORD_W bits (32K bits by default);
// fresh-cell resistances are this model's own values within the nominal band.
module stt_array
  import stt_aging_pkg::*;
#(
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned WORDS      = 1024,
  parameter int unsigned R_AP_FRESH = 4500,
  parameter int unsigned R_P_FRESH  = 1960,
  localparam int unsigned ADDR_W    = $clog2(WORDS)
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic                    we,
  input  logic [ADDR_W-1:0]       addr,
  input  logic [WORD_W-1:0]       wdata,
  // aging of one MTJ (its new AP and P resistances), applied at the clock edge
  input  logic                    age_en,
  input  logic [ADDR_W-1:0]       age_addr,
  input  logic [$clog2(WORD_W)-1:0] age_bit,
  input  ohm_t                    age_rap,
  input  ohm_t                    age_rp,
  output ohm_t [WORD_W-1:0]       bl_res,
  output ohm_t [WORD_W-1:0]       mtj_rap,
  // levels on the selected word line and on the bit and source lines
  output drive_e                  wl,
  output drive_e [WORD_W-1:0]     bl_drv,
  output drive_e [WORD_W-1:0]     sl_drv
);

  logic [WORD_W-1:0] state [WORDS];
  ohm_t [WORD_W-1:0] r_ap  [WORDS];
  ohm_t [WORD_W-1:0] r_p   [WORDS];

  initial begin
    for (int w = 0; w < int'(WORDS); w++) begin
      state[w] = '0;
      for (int b = 0; b < int'(WORD_W); b++) begin
        r_ap[w][b] = ohm_t'(R_AP_FRESH);
        r_p[w][b]  = ohm_t'(R_P_FRESH);
      end
    end
  end

  // Write drivers and read bias.
  always_comb begin
    wl = en ? DRV_VDD : DRV_GND;
    for (int b = 0; b < int'(WORD_W); b++) begin
      if (en && we) begin
        bl_drv[b] = wdata[b] ? DRV_GND : DRV_VDD;
        sl_drv[b] = wdata[b] ? DRV_VDD : DRV_GND;
      end else if (en) begin
        bl_drv[b] = DRV_VREAD;
        sl_drv[b] = DRV_GND;
      end else begin
        bl_drv[b] = DRV_GND;
        sl_drv[b] = DRV_GND;
      end
    end
  end

  // Switching: current from source line to bit line sets AP, the reverse
  // sets P; a read current is too small to switch.
  always_ff @(posedge clk) begin
    if (wl == DRV_VDD) begin
      for (int b = 0; b < int'(WORD_W); b++) begin
        if (sl_drv[b] == DRV_VDD && bl_drv[b] == DRV_GND)      state[addr][b] <= 1'b1;
        else if (bl_drv[b] == DRV_VDD && sl_drv[b] == DRV_GND) state[addr][b] <= 1'b0;
      end
    end
  end

  // Aging of one MTJ: new AP and P resistances in ohms.
  always_ff @(posedge clk) begin
    if (age_en) begin
      r_ap[age_addr][age_bit] <= age_rap;
      r_p[age_addr][age_bit]  <= age_rp;
    end
  end

  // Read path: the selected word line connects each cell to its bit line.
  always_comb begin
    for (int b = 0; b < int'(WORD_W); b++) begin
      if (en && !we) begin
        bl_res[b]  = state[addr][b] ? r_ap[addr][b] : r_p[addr][b];
        mtj_rap[b] = r_ap[addr][b];
      end else begin
        bl_res[b]  = '0;
        mtj_rap[b] = '0;
      end
    end
  end

endmodule
