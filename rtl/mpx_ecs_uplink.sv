// ECS uplink (40 MHz clock, 10 Mbps out): daisy-chain transmitter that merges
// this chip's replies with the frames received from the previous chip.
//
// Own replies arrive from mpx_ecs_downlink as {k, byte} symbols in a FIFO.
// The chain input is received by mpx_ecs_rx; a frame (K28.1 ... K28.5) is
// stored in a second FIFO and becomes eligible once complete. The arbiter
// works per frame: when idle it starts this chip's reply first, otherwise a
// complete chain frame, otherwise it sends K28.5 idle. Each symbol is 8b10b
// encoded with running disparity and sent most significant code bit first,
// four clock cycles per bit. Frames longer than the FIFO depth are not
// supported on the chain. The receiver, arbiter and encoder are named by the
// document; their details are this design's choice.
module mpx_ecs_uplink #(
  parameter int unsigned QDEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       own_push,
  input  logic [8:0] own_sym,
  output logic       own_full,
  input  logic       chain_in,
  output logic       up_out,
  output logic       sent_chain      // strobe: a chain frame was completed
);
  localparam logic [8:0] SYM_SOF = {1'b1, 8'h3C};
  localparam logic [8:0] SYM_EOF = {1'b1, 8'hBC};

  typedef enum logic [1:0] {U_IDLE, U_OWN, U_CHAIN} up_st_t;

  logic       c_valid, c_k, c_err, c_al;
  logic [7:0] c_data;
  logic       c_inframe, c_push, c_full, c_empty, c_pop;
  logic [8:0] c_sym, c_head;
  logic       o_empty, o_pop;
  logic [8:0] o_head;
  logic [$clog2(QDEPTH):0] o_cnt, c_cnt;
  logic [3:0] nframes;
  logic       frame_done;

  up_st_t     st;
  logic [8:0] cur;
  logic [9:0] code, sh;
  logic       rd, rd_n;
  logic [5:0] tick;   // 40 clocks per symbol

  mpx_ecs_rx u_crx (.clk, .rst_n, .din(chain_in), .aligned(c_al),
                    .sym_valid(c_valid), .sym_data(c_data), .sym_k(c_k), .sym_err(c_err));

  // store chain frames (K28.1 .. K28.5), drop idles outside frames
  always_comb begin
    c_push = 1'b0;
    c_sym  = {c_k, c_data};
    if (c_valid && !c_err) begin
      if (!c_inframe) c_push = (c_sym == SYM_SOF);
      else            c_push = 1'b1;
    end
  end
  assign frame_done = c_push && c_inframe && c_sym == SYM_EOF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_inframe <= 1'b0;
    else if (c_valid) begin
      if (c_err)                 c_inframe <= 1'b0;
      else if (c_sym == SYM_SOF) c_inframe <= 1'b1;
      else if (c_sym == SYM_EOF) c_inframe <= 1'b0;
    end
  end

  mpx_sync_fifo #(.WIDTH(9), .DEPTH(QDEPTH)) u_cq (
    .clk, .rst_n, .wr(c_push), .wdata(c_sym), .full(c_full),
    .rd(c_pop), .rdata(c_head), .empty(c_empty), .count(c_cnt));

  mpx_sync_fifo #(.WIDTH(9), .DEPTH(QDEPTH)) u_oq (
    .clk, .rst_n, .wr(own_push), .wdata(own_sym), .full(own_full),
    .rd(o_pop), .rdata(o_head), .empty(o_empty), .count(o_cnt));

  // symbol arbiter
  logic sym_start;
  assign sym_start = (tick == 6'd39);

  always_comb begin
    o_pop = 1'b0;
    c_pop = 1'b0;
    cur   = SYM_EOF;
    if (sym_start) begin
      unique case (st)
        U_OWN:   if (!o_empty) begin o_pop = 1'b1; cur = o_head; end
        U_CHAIN: if (!c_empty) begin c_pop = 1'b1; cur = c_head; end
        default: if (!o_empty) begin o_pop = 1'b1; cur = o_head; end
                 else if (nframes != 0 && !c_empty) begin c_pop = 1'b1; cur = c_head; end
      endcase
    end
  end

  mpx_enc8b10b u_enc (.k(cur[8]), .d(cur[7:0]), .rd_in(rd), .code, .rd_out(rd_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= U_IDLE; tick <= '0; sh <= 10'b0011111010; rd <= 1'b1; nframes <= '0;
      sent_chain <= 1'b0;
    end else begin
      tick       <= sym_start ? '0 : tick + 1'b1;
      sent_chain <= 1'b0;
      if (tick[1:0] == 2'd3) sh <= {sh[8:0], 1'b0};
      if (sym_start) begin
        sh <= code;
        rd <= rd_n;
        if (o_pop)      st <= (o_head == SYM_EOF) ? U_IDLE : U_OWN;
        else if (c_pop) begin
          st <= (c_head == SYM_EOF) ? U_IDLE : U_CHAIN;
          sent_chain <= (c_head == SYM_EOF);
        end
      end
      nframes <= nframes + 4'(frame_done) - 4'(c_pop && c_head == SYM_EOF);
    end
  end

  assign up_out = sh[9];

endmodule
