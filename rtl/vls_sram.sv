// vls_sram: single-port array with synchronous read and masked write.
//
// One instance per way holds the tags, another the data lines. When en is
// high the word at addr is read and appears on rdata after the clock edge; if
// we is also high the GRAN-bit slices selected by be are written in the same
// cycle and rdata returns the old contents. rdata holds its value while en is
// low, so a way that is not enabled keeps its output and draws no access.
// The contents are not reset; the valid bits live in flip-flops in the
// controller. One port per array follows the design description; the
// read-old-data behaviour is this design's choice.
module vls_sram #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 256,
  parameter int GRAN  = 8
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [WIDTH/GRAN-1:0]    be,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) begin
        for (int b = 0; b < WIDTH/GRAN; b++) begin
          if (be[b]) mem[addr][b*GRAN +: GRAN] <= wdata[b*GRAN +: GRAN];
        end
      end
    end
  end

endmodule
