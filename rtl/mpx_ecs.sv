// ECS (Experiment Control System) slow-control interface, 40 MHz reference
// clock: downlink receiver (mpx_ecs_rx), command decoder (mpx_ecs_downlink)
// with its register-file port, and the daisy-chained uplink (mpx_ecs_uplink)
// that returns acknowledgements and read data and forwards the frames of the
// previous chip. Both directions run at 10 Mbps with 8b10b coding, as in the
// document.
module mpx_ecs (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] chip_id,
  input  logic       dn_in,
  input  logic       up_in,
  output logic       up_out,
  output logic       reg_we,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata
);
  logic       s_valid, s_k, s_err, al, q_push, q_full, sent_chain;
  logic [7:0] s_data;
  logic [8:0] q_sym;

  mpx_ecs_rx u_rx (.clk, .rst_n, .din(dn_in), .aligned(al),
                   .sym_valid(s_valid), .sym_data(s_data), .sym_k(s_k), .sym_err(s_err));

  mpx_ecs_downlink u_dn (.clk, .rst_n, .chip_id,
    .sym_valid(s_valid), .sym_data(s_data), .sym_k(s_k), .sym_err(s_err),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .q_push, .q_sym, .q_full);

  mpx_ecs_uplink u_up (.clk, .rst_n, .own_push(q_push), .own_sym(q_sym), .own_full(q_full),
    .chain_in(up_in), .up_out, .sent_chain);

endmodule
