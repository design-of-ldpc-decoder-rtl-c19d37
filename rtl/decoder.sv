// decoder: binary min-max LDPC decoder for a regular (3,6) quasi-cyclic code
// of length N = 6Z (102 bits for the default Z = 17; design rate 1/2, and
// 53 information bits because the parity-check matrix has rank 49).
//
// Data path, in the order the data flows:
//   input_cache  - receives the quantised channel LLRs one per clock and
//                  keeps them as cost pairs for the whole decode;
//   cnu          - check-node pass, min-max rule over 32 parity
//                  configurations per edge;
//   edge_ram     - one 24-bit message word per edge, shared by both passes;
//   addr_rom +   - the code's connections: check-major addressing for the
//   addr_ctrl      check pass, ROM look-up for the variable pass;
//   vnu          - variable-node pass (sum, min, subtract pipeline);
//   output_cache - a-posteriori pairs, read out serially;
//   decoding_decision - one hard bit per variable on code / code_valid.
// control_unit sequences initialisation, MAX_ITER = 10 iterations of
// (CNU pass, VNU pass) and the read-out.
//
// Interface: load N values with llr_valid/llr_ready, pulse start_decode
// (before, during or after loading).  decode_over pulses when the last
// iteration ends; then N bits leave on code/code_valid (code_ready is
// back-pressure, tie it high for one bit per clock) and code_out_over rises
// after the last one.  The next codeword can be loaded while bits are
// leaving.  Once a start is accepted the decoder is busy for
// (11N + 2) + MAX_ITER * ((208M + 2) + (11N + 2)) + 1 cycles, 118,465 for
// Z = 17, almost all of it in the check-node passes.
// Synchronous active-high reset.
//
// The block structure, the min-max algorithm, the node degrees, the 12-bit
// costs and the 10 iterations follow the published decoder; the code, the
// serial schedule and the memory organisation are this design's choices.
module decoder
  import ldpc_pkg::*;
#(
  parameter int Z          = ZDEF,
  parameter int MAX_ITER_P = MAX_ITER,
  parameter int N          = 6 * Z,
  parameter int NW         = $clog2(N),
  parameter int AW         = $clog2(18 * Z),
  parameter int IW         = $clog2(MAX_ITER_P + 1)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic signed [QW-1:0] llr_in,
  input  logic                 llr_valid,
  output logic                 llr_ready,
  input  logic                 start_decode,
  output logic                 decode_over,
  output logic                 code,
  output logic                 code_valid,
  output logic                 code_last,
  input  logic                 code_ready,
  output logic                 code_out_over,
  output logic                 busy,
  output logic [IW-1:0]        iter
);

  // control
  logic in_full, out_busy, cnu_start, cnu_done, vnu_start, vnu_init, vnu_done;
  logic var_phase, in_release, out_start, clear_out;

  // address control
  logic [NW-1:0] cnu_node, vnu_node, ac_node;
  logic [2:0]    cnu_slot, vnu_slot, ac_slot;
  logic [AW-1:0] rom_addr, rom_data, ac_addr;

  // edge RAM
  logic [AW-1:0] cnu_raddr, vnu_raddr, ram_raddr;
  logic          cnu_we, vnu_we, ram_we;
  logic [AW-1:0] cnu_waddr, vnu_waddr, ram_waddr;
  cost_pair_t    cnu_wdata, vnu_wdata, ram_wdata, ram_rdata;

  // caches
  logic [NW-1:0] in_raddr, oc_waddr;
  cost_pair_t    in_rdata, oc_wdata, soft_data;
  logic          oc_we, soft_valid, soft_last, soft_ready;

  control_unit #(.MAX_ITER_P(MAX_ITER_P)) u_ctrl (
    .clk         (clk),
    .rst         (reset),
    .start_decode(start_decode),
    .in_full     (in_full),
    .out_busy    (out_busy),
    .cnu_start   (cnu_start),
    .cnu_done    (cnu_done),
    .vnu_start   (vnu_start),
    .vnu_init    (vnu_init),
    .vnu_done    (vnu_done),
    .var_phase   (var_phase),
    .decode_over (decode_over),
    .in_release  (in_release),
    .out_start   (out_start),
    .clear_out   (clear_out),
    .busy        (busy),
    .iter        (iter)
  );

  input_cache #(.Z(Z)) u_in (
    .clk      (clk),
    .rst      (reset),
    .llr_in   (llr_in),
    .llr_valid(llr_valid),
    .llr_ready(llr_ready),
    .full     (in_full),
    .release_i(in_release),
    .raddr    (in_raddr),
    .rdata    (in_rdata)
  );

  cnu #(.Z(Z)) u_cnu (
    .clk      (clk),
    .rst      (reset),
    .start    (cnu_start),
    .done     (cnu_done),
    .node     (cnu_node),
    .slot     (cnu_slot),
    .addr     (ac_addr),
    .ram_raddr(cnu_raddr),
    .ram_rdata(ram_rdata),
    .ram_we   (cnu_we),
    .ram_waddr(cnu_waddr),
    .ram_wdata(cnu_wdata)
  );

  vnu #(.Z(Z)) u_vnu (
    .clk      (clk),
    .rst      (reset),
    .start    (vnu_start),
    .init     (vnu_init),
    .done     (vnu_done),
    .node     (vnu_node),
    .slot     (vnu_slot),
    .addr     (ac_addr),
    .ram_raddr(vnu_raddr),
    .ram_rdata(ram_rdata),
    .ram_we   (vnu_we),
    .ram_waddr(vnu_waddr),
    .ram_wdata(vnu_wdata),
    .in_raddr (in_raddr),
    .in_rdata (in_rdata),
    .oc_we    (oc_we),
    .oc_waddr (oc_waddr),
    .oc_wdata (oc_wdata)
  );

  always_comb begin
    ac_node   = var_phase ? vnu_node  : cnu_node;
    ac_slot   = var_phase ? vnu_slot  : cnu_slot;
    ram_raddr = var_phase ? vnu_raddr : cnu_raddr;
    ram_we    = var_phase ? vnu_we    : cnu_we;
    ram_waddr = var_phase ? vnu_waddr : cnu_waddr;
    ram_wdata = var_phase ? vnu_wdata : cnu_wdata;
  end

  addr_rom #(.Z(Z)) u_rom (
    .addr(rom_addr),
    .data(rom_data)
  );

  addr_ctrl #(.Z(Z)) u_actl (
    .var_phase(var_phase),
    .node     (ac_node),
    .slot     (ac_slot),
    .rom_addr (rom_addr),
    .rom_data (rom_data),
    .ram_addr (ac_addr)
  );

  edge_ram #(.Z(Z)) u_ram (
    .clk  (clk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .raddr(ram_raddr),
    .rdata(ram_rdata)
  );

  output_cache #(.Z(Z)) u_out (
    .clk       (clk),
    .rst       (reset),
    .we        (oc_we),
    .waddr     (oc_waddr),
    .wdata     (oc_wdata),
    .start     (out_start),
    .busy      (out_busy),
    .soft_data (soft_data),
    .soft_valid(soft_valid),
    .soft_last (soft_last),
    .soft_ready(soft_ready)
  );

  decoding_decision u_dec (
    .clk          (clk),
    .rst          (reset),
    .clear        (clear_out),
    .soft_data    (soft_data),
    .soft_valid   (soft_valid),
    .soft_last    (soft_last),
    .soft_ready   (soft_ready),
    .code         (code),
    .code_valid   (code_valid),
    .code_last    (code_last),
    .code_ready   (code_ready),
    .code_out_over(code_out_over)
  );

endmodule
