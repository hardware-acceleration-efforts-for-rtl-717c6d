// rpau: residue polynomial arithmetic unit, the processing element of the
// accelerator. One RPAU owns one RNS modulus q and does all the arithmetic on
// the residue polynomials of that modulus; its neighbours in the ring own the
// other moduli.
// Inside: the 16-butterfly NTT unit with its twiddle tables, the 4-core dyadic
// unit fed by the on-the-fly key generator (ksk_prng), the packed polynomial
// memory (poly_mem), the link unit for the neighbour-to-neighbour chain and
// the microcode sequencer that drives them. The memory gives each user its own
// ports: NTT 2 reads + 2 writes, dyadic 3 reads + 1 write, link 1 read + 1
// write, host 1 read + 1 write.
// Host interface (used before and after a program runs):
//   cfg_*  registers 0: q, 1: mu = floor(2^(2k)/q), 2: k = bit length of q,
//          3: log2 N, 4..7: scalar constants 0..3 (for DY_MULS);
//   tw_*   twiddle table entries; uc_* microcode words;
//   h_*    one memory row per cycle, read data one cycle after h_re;
//   start  runs the program from address 0; done pulses at HALT.
// The key PRNG seed of a SEED instruction is {ID, 15'b0, imm}, so one program
// run by all RPAUs still gives each its own key stream.
// Link ports: plain valid/ready/row signals to the next (tx_*) and previous
// (rx_*) RPAU.
// From the document: one RPAU per RNS base, two separate cores (16-butterfly
// NTT and 4-core dyadic), memory blocks, on-the-fly key generation and the
// chain to the neighbours. This design's choices: the port split, the host
// registers and the seed format.
module rpau
  import medha_pkg::*;
#(
  parameter int unsigned ID      = 0,
  parameter int unsigned COEF_W  = 54,
  parameter int unsigned SLOTS   = 40,
  parameter int unsigned LOGN_MX = 14,
  parameter int unsigned TW_LOGN = LOGN_MAX,
  parameter int unsigned UDEPTH  = 1024
)(
  input  logic                      clk,
  input  logic                      rst_n,
  // host
  input  logic                      cfg_we,
  input  logic [2:0]                cfg_addr,
  input  logic [63:0]               cfg_data,
  input  logic                      tw_we,
  input  logic                      tw_tab,
  input  logic [TW_LOGN-1:0]        tw_idx,
  input  coef_t                     tw_data,
  input  logic                      uc_we,
  input  logic [$clog2(UDEPTH)-1:0] uc_addr,
  input  instr_t                    uc_data,
  input  logic                      h_we,
  input  logic                      h_re,
  input  logic [SLOT_W-1:0]         h_slot,
  input  logic [LOGN_MAX-5:0]       h_row,
  input  row_t                      h_wdata,
  output row_t                      h_rdata,
  input  logic                      start,
  output logic                      running,
  output logic                      done,
  output logic [31:0]               cnt_cycles,
  output logic [31:0]               cnt_stall,
  output logic [31:0]               cnt_overlap,
  // chain
  output logic                      tx_valid,
  input  logic                      tx_ready,
  output row_t                      tx_data,
  input  logic                      rx_valid,
  output logic                      rx_ready,
  input  row_t                      rx_data
);
  // -------------------------------------------------------------- registers
  modulus_t   md;
  logic [3:0] logn;
  coef_t      scalar [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md <= '0; logn <= 4'd14;
      for (int i = 0; i < 4; i++) scalar[i] <= '0;
    end else if (cfg_we) begin
      case (cfg_addr)
        3'd0: md.q    <= coef_t'(cfg_data);
        3'd1: md.mu   <= (QW+1)'(cfg_data);
        3'd2: md.k    <= KW'(cfg_data);
        3'd3: logn    <= 4'(cfg_data);
        default: scalar[cfg_addr[1:0]] <= coef_t'(cfg_data);
      endcase
    end
  end

  // ----------------------------------------------------------------- memory
  localparam int unsigned NR = 7, NW = 5;
  logic                rd_en [NR], wr_en [NW];
  logic [SLOT_W-1:0]   rd_slot [NR], wr_slot [NW];
  logic [LOGN_MAX-5:0] rd_row [NR], wr_row [NW];
  row_t                rd_data [NR], wr_data [NW];

  poly_mem #(.COEF_W(COEF_W), .SLOTS(SLOTS), .LOGN_MX(LOGN_MX), .NR(NR), .NW(NW)) u_mem (
    .clk, .logn, .rd_en, .rd_slot, .rd_row, .rd_data, .wr_en, .wr_slot, .wr_row, .wr_data);

  // port map: read 0,1 NTT; 2,3,4 dyadic; 5 link; 6 host
  //           write 0,1 NTT; 2 dyadic; 3 link; 4 host
  assign rd_en[6] = h_re; assign rd_slot[6] = h_slot; assign rd_row[6] = h_row;
  assign h_rdata  = rd_data[6];
  assign wr_en[4] = h_we; assign wr_slot[4] = h_slot; assign wr_row[4] = h_row;
  assign wr_data[4] = h_wdata;

  // -------------------------------------------------------------- sequencer
  logic  ntt_busy, dya_busy, tx_busy, rx_busy;
  logic  ntt_start, dya_start, tx_start, rx_start, seed_load;
  logic  ntt_done, dya_done, tx_done, rx_done;
  ucmd_t cmd;
  logic [32:0] seed_imm;

  ucode_ctrl #(.UDEPTH(UDEPTH)) u_ctrl (
    .clk, .rst_n, .uc_we, .uc_addr, .uc_data, .start, .running, .done,
    .ntt_busy, .dya_busy, .tx_busy, .rx_busy, .ntt_start, .dya_start, .tx_start, .rx_start,
    .cmd, .seed_load, .seed(seed_imm), .cnt_cycles, .cnt_stall, .cnt_overlap);

  // --------------------------------------------------------------- NTT unit
  logic tw_en, tw_rtab;
  logic [LOGN_MAX-5:0] tw_row;
  row_t tw_rdata;

  twiddle_mem #(.LOGN(TW_LOGN)) u_tw (
    .clk, .wr_en(tw_we), .wr_tab(tw_tab), .wr_idx(tw_idx), .wr_data(tw_data),
    .rd_en(tw_en), .rd_tab(tw_rtab), .rd_row(tw_row[TW_LOGN-5:0]), .rd_data(tw_rdata));

  ntt_unit u_ntt (
    .clk, .rst_n, .md, .logn, .start(ntt_start), .inverse(cmd.inverse),
    .src(cmd.a), .dst(cmd.dst), .tmp(cmd.c), .busy(ntt_busy), .done(ntt_done),
    .rd_en(rd_en[0:1]), .rd_slot(rd_slot[0:1]), .rd_row(rd_row[0:1]), .rd_data(rd_data[0:1]),
    .wr_en(wr_en[0:1]), .wr_slot(wr_slot[0:1]), .wr_row(wr_row[0:1]), .wr_data(wr_data[0:1]),
    .tw_en, .tw_tab(tw_rtab), .tw_row, .tw_data(tw_rdata));

  // ------------------------------------------------------------ dyadic unit
  logic  k_take;
  coef_t k_val [DCORES];

  ksk_prng u_prng (
    .clk, .rst_n, .q(md.q), .load(seed_load), .seed({16'(ID), 15'd0, seed_imm}),
    .take(k_take), .val(k_val));

  dyadic_unit u_dya (
    .clk, .rst_n, .md, .logn, .start(dya_start), .cmd, .scalar, .busy(dya_busy), .done(dya_done),
    .rd_en(rd_en[2:4]), .rd_slot(rd_slot[2:4]), .rd_row(rd_row[2:4]), .rd_data(rd_data[2:4]),
    .wr_en(wr_en[2]), .wr_slot(wr_slot[2]), .wr_row(wr_row[2]), .wr_data(wr_data[2]),
    .k_take, .k_val);

  // -------------------------------------------------------------- link unit
  ring_link_if lo (.clk, .rst_n);
  ring_link_if li (.clk, .rst_n);
  assign tx_valid = lo.valid;
  assign tx_data  = lo.data;
  assign lo.ready = tx_ready;
  assign li.valid = rx_valid;
  assign li.data  = rx_data;
  assign rx_ready = li.ready;

  link_unit u_link (
    .clk, .rst_n, .logn, .tx_start, .tx_slot(cmd.a), .tx_busy, .tx_done,
    .rx_start, .rx_slot(cmd.dst), .rx_busy, .rx_done,
    .rd_en(rd_en[5]), .rd_slot(rd_slot[5]), .rd_row(rd_row[5]), .rd_data(rd_data[5]),
    .wr_en(wr_en[3]), .wr_slot(wr_slot[3]), .wr_row(wr_row[3]), .wr_data(wr_data[3]),
    .out(lo.tx), .in(li.rx));

endmodule
