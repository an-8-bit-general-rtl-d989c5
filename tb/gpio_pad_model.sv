// gpio_pad_model: behavioural model of one GPIO pad cell, for testbenches.
//
// The real cell is analog (ESD protection, Schmitt trigger, level shifters,
// pull-down, tri-state control and drivers). This model keeps only its
// logic: with OEN low the pad carries I; otherwise it carries the level an
// external device drives, or 0 through the pull-down when nothing drives it.
// C returns the pad level while IE is high and 0 otherwise. DS only changes
// drive strength in the real cell and has no logic effect here. The pad
// itself is split into the external drive (ext_en, ext_level) and the
// resulting level (pad), as a two-state simulator has no high impedance.
module gpio_pad_model (
  input  logic i,
  input  logic oen,
  input  logic ds,
  input  logic ie,
  input  logic ext_en,
  input  logic ext_level,
  output logic pad,
  output logic c,
  output logic contention
);
  logic unused_ds;
  assign unused_ds  = ds;
  assign pad        = !oen ? i : (ext_en ? ext_level : 1'b0);
  assign c          = ie ? pad : 1'b0;
  assign contention = !oen && ext_en;
endmodule
