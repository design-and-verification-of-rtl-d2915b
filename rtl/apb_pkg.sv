// apb_pkg: types and constants shared by the APB bridge, slave and top.
//
// The APB transfer runs through three phases, IDLE, SETUP and ACCESS; the
// bridge keeps them in a register of type apb_state_e and the slave decodes
// the same phases from PSEL and PENABLE. Address and data are 32 bits wide,
// the widest bus APB allows. Each slave holds a 1K x 32 memory addressed by
// PADDR[9:0] (word addresses); the bit above that field chooses the slave.
// The state encoding and the slave-select field position are this design's
// own choices.
package apb_pkg;

  localparam int unsigned ADDR_W = 32;  // PADDR width
  localparam int unsigned DATA_W = 32;  // PWDATA / PRDATA width
  localparam int unsigned MEM_AW = 10;  // slave memory address: PADDR[9:0]

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef enum logic [1:0] {
    APB_IDLE   = 2'd0,  // PSEL = 0, PENABLE = 0
    APB_SETUP  = 2'd1,  // PSEL = 1, PENABLE = 0
    APB_ACCESS = 2'd2   // PSEL = 1, PENABLE = 1
  } apb_state_e;

endpackage
