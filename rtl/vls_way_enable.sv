// vls_way_enable: way enables for the tag and data arrays.
//
// A VLS access is direct-mapped: only its one way (selected by the address
// bits just above the set index) is read, so the tags and data of the other
// ways are not read out. A regular cached access searches every way,
// including the ways currently given to the VLS, so that cached data already
// in a newly created partition stays reachable. Purely combinational.
// Behaviour follows the design description; the one-hot encoding is this
// design's choice.
module vls_way_enable
  import vls_pkg::*;
(
  input  logic             is_vls,
  input  logic [WAY_W-1:0] vls_way,
  output logic [WAYS-1:0]  way_en
);

  always_comb begin
    if (is_vls) way_en = WAYS'(1) << vls_way;
    else        way_en = '1;
  end

endmodule
