// freq_rom - frequency generation ROM of the frequency scaling unit.
//
// Each entry holds the multiplier M and divider D of the DCM_ADV frequency
// synthesizer (stored as M-1 and D-1, the form written over the DCM
// reconfiguration port) and the output frequency F_IN_KHZ*M/D in kHz. Entry i
// aims at F_MIN_KHZ + i*(F_MAX_KHZ-F_MIN_KHZ)/(DEPTH-1); for every divider
// D = 1..32 the nearest multiplier M = 2..32 is tried and the pair closest to
// the target is kept. Entries therefore rise with the index, so the frequency
// scaling unit can walk up and down the table. The table is computed when the
// design is elaborated and initialises a memory with one registered read port,
// which maps onto one block RAM.
//
// Interface: addr, data (an avls_pkg::freq_entry_t). Timing: data is valid one
// clock after addr.
//
// From the design description: a ROM in block RAM holding the DCM_ADV values;
// the DCM can produce frequencies down to 22 MHz; the measured operating range
// ends at about 245 MHz. Own choices: the 100 MHz reference, the 250 MHz top
// entry, 128 entries and the evenly spaced targets.
module freq_rom
  import avls_pkg::*;
#(
  parameter int unsigned DEPTH     = 128,
  parameter int unsigned F_IN_KHZ  = 100_000,
  parameter int unsigned F_MIN_KHZ = 22_000,
  parameter int unsigned F_MAX_KHZ = 250_000,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [AW-1:0] addr,
  output freq_entry_t data
);

  // Smallest synthesizable frequency (kHz, rounded down) that is at least
  // lo_khz, with its multiplier and divider.
  function automatic freq_entry_t entry_for(int unsigned lo_khz);
    int unsigned best_f, best_m, best_d, m, f;
    freq_entry_t e;
    best_f = 32'hFFFF_FFFF;
    best_m = 32;
    best_d = 1;
    for (int unsigned d = 1; d <= 32; d++) begin
      m = (lo_khz * d + F_IN_KHZ - 1) / F_IN_KHZ;     // ceiling
      if (m < 2) m = 2;
      for (int unsigned k = 0; k < 2; k++) begin      // floor() may fall short
        f = (F_IN_KHZ * (m + k)) / d;
        if (m + k <= 32 && f >= lo_khz && f < best_f) begin
          best_f = f;
          best_m = m + k;
          best_d = d;
        end
      end
    end
    e.m_minus1 = 8'(best_m - 1);
    e.d_minus1 = 8'(best_d - 1);
    e.f_khz    = FKHZ_W'((F_IN_KHZ * best_m) / best_d);
    return e;
  endfunction

  freq_entry_t rom [DEPTH];

  initial begin
    int unsigned target, prev;
    prev = 0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      target = F_MIN_KHZ + (i * (F_MAX_KHZ - F_MIN_KHZ)) / (DEPTH - 1);
      rom[i] = entry_for((target > prev) ? target : prev + 1);
      prev   = int'(rom[i].f_khz);
    end
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
