// wrapper_pkg: types shared by the FIFO wrapper modules.
//
// ctrl_state_t is the state encoding of the wrapper control FSM (wrapper_ctrl):
//   CTRL_IDLE - waiting for a word in the input FIFO and a free slot in the output FIFO
//   CTRL_RUN  - the IP clock is enabled; one IP clock pulse per system clock cycle
//   CTRL_XFER - the IP result is pushed into the output FIFO and the consumed word popped
// The three-state split is this design's own choice; the source design only says that
// the control logic handles the data flow between the input FIFO, the IP and the output FIFO.
package wrapper_pkg;

  typedef enum logic [1:0] {
    CTRL_IDLE = 2'd0,
    CTRL_RUN  = 2'd1,
    CTRL_XFER = 2'd2
  } ctrl_state_t;

endpackage
