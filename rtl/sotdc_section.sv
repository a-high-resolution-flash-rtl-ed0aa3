// sotdc_section: one section of the flash converter, LEVELS levels side by side.
//
// Every level receives the same phi_data, phi_ref and phi_FF; the levels differ
// only in the random offset of their arbiters, so together they quantize the
// time difference between the data and reference edges at thresholds
// -t_os(0) .. -t_os(LEVELS-1). All levels are characterized at once: one run of
// N reference cycles fills all LEVELS counters.
//
// The fabricated converter has two sections of 32 levels; the section split
// follows the document. Level i of section SECTION_ID gets the offset
// level_offset_ps(SECTION_ID*LEVELS + i) from sotdc_pkg (a model value in the
// measured +3 .. +16 ps range). counts[i] is the raw LFSR state of level i.
`timescale 1ps / 1fs
module sotdc_section import sotdc_pkg::*; #(
  parameter int unsigned SECTION_ID = 0,
  parameter int unsigned LEVELS     = LEVELS_PER_SECTION,
  parameter int unsigned CNT_W      = COUNT_W,
  parameter real         SIGMA_PS   = SIGMA_FF_PS
) (
  input  logic             phi_data,
  input  logic             phi_ref,
  input  logic             phi_ff,
  input  logic             rst_n,
  output logic [CNT_W-1:0] counts [LEVELS]
);

  for (genvar i = 0; i < LEVELS; i++) begin : g_level
    sotdc_level #(
      .T_OS_PS (level_offset_ps(SECTION_ID * LEVELS + i)),
      .SIGMA_PS(SIGMA_PS),
      .CNT_W   (CNT_W)
    ) u_level (
      .phi_data (phi_data),
      .phi_ref  (phi_ref),
      .phi_ff   (phi_ff),
      .rst_n    (rst_n),
      .count_out(counts[i])
    );
  end

endmodule
