// sm_counter_pkg: command type of the three-mode counter example (sm_counter).
package sm_counter_pkg;
  typedef enum logic [1:0] {
    CMD_RESET = 2'd0,
    CMD_COUNT = 2'd1,
    CMD_HOLD  = 2'd2
  } sm_cmd_e;
endpackage
