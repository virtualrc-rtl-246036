// vrc_pkg: types and constants shared by the virtual platform.
// The platform bus is modelled as a single-outstanding-read word bus:
// a request struct (write flag, word address, write data) with valid/grant,
// and a separate read-response valid/data pair. Address bits [31:28]
// select the target (communication controllers first, then the virtual
// memories); the lower bits are the word address inside the target.
// The bus format and the address map are this design's own choices.
package vrc_pkg;
  localparam int HOST_AW = 32;
  localparam int HOST_DW = 64;
  localparam int SEL_LSB = 28;
  localparam int SEL_W   = HOST_AW - SEL_LSB;

  typedef struct packed {
    logic               we;
    logic [HOST_AW-1:0] addr;
    logic [HOST_DW-1:0] wdata;
  } host_req_t;
endpackage
