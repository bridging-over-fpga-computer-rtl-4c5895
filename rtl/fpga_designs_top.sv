// fpga_designs_top: the four designs of this collection side by side.
//
//  - w_messen: the main design, a multiplexer that decodes the position
//    pulses of a CT scanner's rotating part (Ap/Apr) and patient table
//    (Htp/Htpr) and re-codes them onto one line in 650 us windows, with
//    latched error and activity flags for a master.
//  - count_demo: a state machine that runs an 8-bit counter block to 63.
//  - sm_counter: a counter driven by the commands count, hold and reset.
//  - nand_gate: a single two-input NAND gate (combinational).
// The clocked ones share only the clock and reset; each has its own ports.
// Interface: clk (1 MHz for w_messen), rst_n (asynchronous, active low); see
// the individual modules for the rest.
module fpga_designs_top (
  input  logic        clk,
  input  logic        rst_n,
  // w_messen
  input  logic        rot_in,
  input  logic        phs_in,
  input  logic        mode_sp,
  input  logic [8:0]  reset_vektor,
  output logic        mux_out,
  output logic [8:0]  result_vektor,
  output logic [8:0]  xs,
  // count_demo
  input  logic        cnt_to_and_from,
  output logic [7:0]  cnt_result,
  // sm_counter
  input  logic [1:0]  sm_control,
  output logic [15:0] sm_stand,
  // nand_gate
  input  logic        nand_a,
  input  logic        nand_b,
  output logic        nand_y
);
  w_messen u_w_messen (
    .clk, .rst_n, .rot_in, .phs_in, .mode_sp, .reset_vektor,
    .mux_out, .result_vektor, .xs
  );

  count_demo u_count_demo (
    .clk, .rst_n, .to_and_from(cnt_to_and_from), .result(cnt_result)
  );

  sm_counter u_sm_counter (
    .clk, .rst_n, .cmd(sm_control), .stand(sm_stand)
  );

  nand_gate u_nand_gate (
    .a(nand_a), .b(nand_b), .y(nand_y)
  );
endmodule
