// chip_link_top: the two CHIP-LINK routers side by side.
//
// The full router (buffered, round-robin allocated, table routed, 8-bit
// flits) is the main design; its ports carry the fr_ prefix. The first simple
// router (bufferless, fixed priority, source routed, 18-bit phits) is the
// earlier design it grew from; its ports carry the sr_ prefix. The two share
// only clock and reset. Port meanings and timing are described in
// chip_link_router and simple_router.
module chip_link_top (
  input  logic                                                      clk,
  input  logic                                                      rst,
  // full router
  input  logic [chip_link_pkg::NPORTS-1:0][chip_link_pkg::FLIT_W-1:0] fr_i,
  input  logic [chip_link_pkg::NPORTS-1:0]                          fr_ew,
  output logic [chip_link_pkg::NPORTS-1:0]                          fr_pf,
  output logic [chip_link_pkg::NPORTS-1:0][chip_link_pkg::FLIT_W-1:0] fr_o,
  input  logic [chip_link_pkg::NPORTS-1:0]                          fr_er,
  output logic [chip_link_pkg::NPORTS-1:0]                          fr_ne,
  input  logic                                                      fr_cfg_we,
  input  logic [chip_link_pkg::ADDR_W-1:0]                          fr_cfg_addr,
  input  logic [chip_link_pkg::PORT_W-1:0]                          fr_cfg_port,
  // first simple router
  input  logic [chip_link_pkg::NPORTS-1:0][chip_link_pkg::PHIT_W-1:0] sr_i,
  output logic [chip_link_pkg::NPORTS-1:0][chip_link_pkg::PHIT_W-1:0] sr_o
);

  chip_link_router u_full (
    .clk     (clk),
    .rst     (rst),
    .i       (fr_i),
    .ew      (fr_ew),
    .pf      (fr_pf),
    .o       (fr_o),
    .er      (fr_er),
    .ne      (fr_ne),
    .cfg_we  (fr_cfg_we),
    .cfg_addr(fr_cfg_addr),
    .cfg_port(fr_cfg_port)
  );

  simple_router u_simple (
    .clk(clk),
    .rst(rst),
    .i  (sr_i),
    .o  (sr_o)
  );

endmodule
