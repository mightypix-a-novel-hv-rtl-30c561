// Central register file shared by the ECS and I2C slow-control interfaces
// (40 MHz reference-clock domain).
//
// NCFG read/write configuration registers of 8 bits, each triplicated
// (mpx_tmr_reg) as the document requires for configuration registers, at
// addresses 0..NCFG-1, followed by NSTAT read-only status bytes. Two write
// ports: the ECS port wins when both write in the same cycle. Reads are
// combinational on both ports; reading an unused address returns 0.
// Register map (this design's choice; the document gives none):
//   0 CTRL   [0] readout enable, [2:1] links-1, [4:3] rate, [6:5] link source
//   1 CLCEND LdCol wait count (default 11, from the document)
//   2 CLPEND LdPix wait count (default 2)
//   3 TFC    [0] enable TFC commands
module mpx_regfile #(
  parameter int unsigned NCFG  = 8,
  parameter int unsigned NSTAT = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ECS port
  input  logic                     ecs_we,
  input  logic [7:0]               ecs_addr,
  input  logic [7:0]               ecs_wdata,
  output logic [7:0]               ecs_rdata,
  // I2C port
  input  logic                     i2c_we,
  input  logic [7:0]               i2c_addr,
  input  logic [7:0]               i2c_wdata,
  output logic [7:0]               i2c_rdata,
  // register contents
  output logic [NCFG-1:0][7:0]     cfg,
  input  logic [NSTAT-1:0][7:0]    status
);

  function automatic logic [7:0] init_of(input int unsigned a);
    case (a)
      0:       return 8'h17;  // enabled, 4 links, 1.28 Gbps, hit data
      1:       return 8'd11;
      2:       return 8'd2;
      3:       return 8'h01;
      default: return 8'h00;
    endcase
  endfunction

  for (genvar i = 0; i < NCFG; i++) begin : g_reg
    logic       we;
    logic [7:0] d;
    always_comb begin
      we = 1'b0;
      d  = i2c_wdata;
      if (ecs_we && ecs_addr == 8'(i)) begin
        we = 1'b1;
        d  = ecs_wdata;
      end else if (i2c_we && i2c_addr == 8'(i)) begin
        we = 1'b1;
      end
    end
    mpx_tmr_reg #(.W(8), .INIT(init_of(i))) u_reg (.clk, .rst_n, .we, .d, .q(cfg[i]));
  end

  function automatic logic [7:0] rd(input logic [7:0] a,
                                    input logic [NCFG-1:0][7:0] c,
                                    input logic [NSTAT-1:0][7:0] s);
    if (int'(a) < NCFG)              return c[a];
    else if (int'(a) < NCFG + NSTAT) return s[int'(a) - NCFG];
    else                             return 8'h00;
  endfunction

  assign ecs_rdata = rd(ecs_addr, cfg, status);
  assign i2c_rdata = rd(i2c_addr, cfg, status);

endmodule
