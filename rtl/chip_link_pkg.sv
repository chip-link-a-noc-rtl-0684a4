// chip_link_pkg: constants and types shared by the CHIP-LINK routers.
//
// The full router moves 8-bit flits between four ports. Each flit carries
// its destination network address in its upper ADDR_W bits and payload in
// the rest; the flit width, the port count and the 8-entry buffers follow
// the document, while the split of the flit into address and payload
// (4 + 4 bits) is this design's own choice.
//
// The first, bufferless router moves 18-bit phits. The top four bits of a
// phit hold a 2-bit type (head = 3, payload = 2, as in the document) and a
// 2-bit output-port route field; the other two type codes mean "idle".
package chip_link_pkg;

  // ---- full router -------------------------------------------------------
  localparam int NPORTS    = 4;                  // router radix
  localparam int PORT_W    = $clog2(NPORTS);     // bits of an output port number
  localparam int FLIT_W    = 8;                  // flit width
  localparam int ADDR_W    = 4;                  // destination address field
  localparam int BUF_PTR_W = 3;                  // buffers hold 2**3 = 8 flits

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [PORT_W-1:0] port_t;

  // ---- first simple router -----------------------------------------------
  localparam int PHIT_W = 18;

  typedef enum logic [1:0] {
    PH_IDLE0   = 2'b00,
    PH_IDLE1   = 2'b01,
    PH_PAYLOAD = 2'b10,
    PH_HEAD    = 2'b11
  } phit_type_e;

  typedef logic [PHIT_W-1:0] phit_t;

endpackage
