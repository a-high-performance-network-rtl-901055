// addr_map: mapping unit (address decoder) of the master-side packetizer.
//
// Converts an AXI address into the network address of the memory node that
// holds it. The address space is cut into NUM_MEM equal regions of
// 2^REGION_BITS bytes; region r lives on node MEM_BASE + (r mod NUM_MEM).
// Purely combinational. The document names the unit but not its map, so the
// interleaving rule and the defaults (15 memories on nodes 10..24, as in its
// 25-node configuration with ten processors) are this design's choice.
module addr_map
  import ni_pkg::*;
#(
  parameter int NUM_MEM     = 15,
  parameter int MEM_BASE    = 10,
  parameter int REGION_BITS = 20
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [NODE_W-1:0] node
);
  logic [ADDR_W-REGION_BITS-1:0] region;
  assign region = addr[ADDR_W-1:REGION_BITS];
  assign node   = NODE_W'(32'(MEM_BASE) + (32'(region) % 32'(NUM_MEM)));
endmodule
