// board_pkg: constants shared by the board-under-test control logic and its
// testbenches: the one-byte command codes of the UART protocol and the
// power-on values of the stimulus registers.
//
// Protocol (this design's own; the method only says that control and data
// bytes arrive over the UART and the captured data leaves as bytes):
//   CMD_KEY  'K' + 16 bytes  load the AES key
//   CMD_MSG0 '0' + 16 bytes  load Msg_0, the message that presets the pipeline
//   CMD_MSG1 '1' + 16 bytes  load Msg_1, the message that launches the test
//   CMD_COND 'C' + 16 bytes  load the ILA Conditions (trigger value)
//   CMD_CAPT 'E'             capture: the board answers with the 16 bytes of
//                            the captured S1 state
// Multi-byte values are sent most significant byte first, i.e. in the order
// of their hex strings. The power-on values are the key and message pair
// that make S1 all zeros for Msg_0 and all ones for Msg_1, with Conditions
// equal to Msg_1, so a board fresh out of reset can capture at once.
package board_pkg;

  typedef enum logic [7:0] {
    CMD_KEY  = 8'h4B,
    CMD_MSG0 = 8'h30,
    CMD_MSG1 = 8'h31,
    CMD_COND = 8'h43,
    CMD_CAPT = 8'h45
  } cmd_e;

  localparam logic [127:0] KEY_INIT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] MSG0_INIT = 128'h5aa6044e28ec2d1596cae34557eac82c;
  localparam logic [127:0] MSG1_INIT = 128'hf8a89d615fe23b9a3ca0223df0615106;
  localparam logic [127:0] COND_INIT = MSG1_INIT;

endpackage
