// sotdc_top: 64-level sampling offset flash time-to-digital converter, with the
// single-level programmable-logic prototype beside it.
//
// The converter measures where the rising edge of phi_data falls relative to
// the rising edge of the accurate reference phi_ref, with picosecond resolution
// and no delay line: each of the 64 levels compares the same two edges with an
// arbiter whose threshold is its own random mismatch offset. Each level counts,
// over N reference cycles, how often the data edge was early enough; after a
// calibration that finds every level's offset, the counts give the distribution
// (mean and rms) of the data edge's jitter. The levels are split into two
// sections of 32 (section 0 holds levels 0..31, section 1 levels 32..63).
//
// Interface of the converter: phi_data, phi_ref and phi_ff are free-running
// clocks of the same frequency; phi_ff must rise after both data and reference
// edges and while both are still high. rst_n (asynchronous, active low) clears
// all counters to the LFSR seed. The counters are read through rd_addr / rd_clk /
// rd_count (see sotdc_readout): rd_count is the raw 20-bit LFSR state of level
// rd_addr, decoded to an event count off chip.
// The prototype (cpld_*) has its own pins: see cpld_level.
//
// Follows the document: 64 levels in two sections of 32, one arbiter, three
// flip-flops and a 20-bit LFSR per level, phi_FF, the 20-bit prototype. This
// design's choice: the resets and the readout circuit.
`timescale 1ps / 1fs
module sotdc_top import sotdc_pkg::*; (
  // Custom flash converter
  input  logic                    phi_data,
  input  logic                    phi_ref,
  input  logic                    phi_ff,
  input  logic                    rst_n,
  input  logic                    rd_clk,
  input  logic [LEVEL_ADDR_W-1:0] rd_addr,
  output logic [COUNT_W-1:0]      rd_count,
  // Single-level prototype
  input  logic                    cpld_phi_data,
  input  logic                    cpld_phi_clock,
  input  logic                    cpld_rst_n,
  output logic [COUNT_W-1:0]      cpld_count_out
);

  logic [COUNT_W-1:0] counts [NUM_LEVELS];

  for (genvar s = 0; s < NUM_SECTIONS; s++) begin : g_section
    logic [COUNT_W-1:0] section_counts [LEVELS_PER_SECTION];

    sotdc_section #(
      .SECTION_ID(s),
      .LEVELS    (LEVELS_PER_SECTION),
      .CNT_W     (COUNT_W)
    ) u_section (
      .phi_data(phi_data),
      .phi_ref (phi_ref),
      .phi_ff  (phi_ff),
      .rst_n   (rst_n),
      .counts  (section_counts)
    );

    for (genvar i = 0; i < LEVELS_PER_SECTION; i++) begin : g_map
      assign counts[s * LEVELS_PER_SECTION + i] = section_counts[i];
    end
  end

  sotdc_readout #(
    .LEVELS(NUM_LEVELS),
    .CNT_W (COUNT_W),
    .ADDR_W(LEVEL_ADDR_W)
  ) u_readout (
    .rd_clk  (rd_clk),
    .rst_n   (rst_n),
    .counts  (counts),
    .rd_addr (rd_addr),
    .rd_count(rd_count)
  );

  cpld_level #(.COUNT_W(COUNT_W)) u_cpld (
    .phi_data (cpld_phi_data),
    .phi_clock(cpld_phi_clock),
    .rst_n    (cpld_rst_n),
    .count_out(cpld_count_out)
  );

endmodule
