// link_unit: moves whole polynomials between neighbouring RPAUs.
// Two independent engines. The send engine reads the N/16 rows of slot a from
// memory and puts them on the outgoing link, one row per cycle while the next
// RPAU accepts; a two-row buffer absorbs the one-cycle memory latency so the
// link runs at full rate under back-pressure. The receive engine raises ready
// on the incoming link and writes each accepted row straight into slot dst.
// A polynomial meant for an RPAU further along the ring is received and sent
// on again by the RPAUs in between (store and forward), so only neighbours
// are ever wired together.
// Interface: tx_start / rx_start with the slot while the engine's busy is
// low; each engine pulses its done when its last row has moved. Memory: one
// read port (send) and one write port (receive).
// Timing: with ready held high a send of N/16 rows takes N/16+3 cycles from
// tx_start to tx_done; the receive engine adds no cycles of its own.
// From the document: only neighbouring RPAUs are connected and data travels
// along the chain. This design's choices: row-wide links, valid/ready flow
// control and store-and-forward through memory.
module link_unit
  import medha_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           logn,
  input  logic                 tx_start,
  input  logic [SLOT_W-1:0]    tx_slot,
  output logic                 tx_busy,
  output logic                 tx_done,
  input  logic                 rx_start,
  input  logic [SLOT_W-1:0]    rx_slot,
  output logic                 rx_busy,
  output logic                 rx_done,
  // memory
  output logic                 rd_en,
  output logic [SLOT_W-1:0]    rd_slot,
  output logic [LOGN_MAX-5:0]  rd_row,
  input  row_t                 rd_data,
  output logic                 wr_en,
  output logic [SLOT_W-1:0]    wr_slot,
  output logic [LOGN_MAX-5:0]  wr_row,
  output row_t                 wr_data,
  // chain
  ring_link_if.tx              out,
  ring_link_if.rx              in
);
  localparam int unsigned RW = LOGN_MAX - 4;

  logic [RW:0] nrows;
  assign nrows = (RW+1)'(1 << (logn - 4'd4));

  // ------------------------------------------------------------ send engine
  logic              tx_act;
  logic [SLOT_W-1:0] tx_s;
  logic [RW:0]       tx_issued, tx_sent;
  logic              rd_pend;                // read issued last cycle
  row_t              fifo [2];
  logic [1:0]        fcnt;
  logic              fhead;
  logic              push, pop;

  assign pop   = out.valid && out.ready;
  assign push  = rd_pend;
  assign rd_en = tx_act && (tx_issued != nrows) &&
                 (2'(fcnt) + 2'(rd_pend) - 2'(pop) < 2'd2);
  assign rd_slot = tx_s;
  assign rd_row  = RW'(tx_issued);
  assign out.valid = (fcnt != 2'd0);
  assign out.data  = fifo[fhead];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_act <= 1'b0; tx_s <= '0; tx_issued <= '0; tx_sent <= '0; rd_pend <= 1'b0;
      fcnt <= '0; fhead <= 1'b0; tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      rd_pend <= rd_en;
      if (!tx_act && tx_start) begin
        tx_act <= 1'b1; tx_s <= tx_slot; tx_issued <= '0; tx_sent <= '0;
      end
      if (rd_en) tx_issued <= tx_issued + 1'b1;
      if (push) fifo[fhead ^ fcnt[0]] <= rd_data;
      if (pop) begin
        fhead   <= ~fhead;
        tx_sent <= tx_sent + 1'b1;
        if (tx_sent + 1'b1 == nrows) begin tx_act <= 1'b0; tx_done <= 1'b1; end
      end
      fcnt <= fcnt + 2'(push) - 2'(pop);
    end
  end
  assign tx_busy = tx_act;

  // --------------------------------------------------------- receive engine
  logic              rx_act;
  logic [SLOT_W-1:0] rx_s;
  logic [RW:0]       rx_cnt;

  assign in.ready = rx_act;
  assign wr_en    = in.valid && in.ready;
  assign wr_slot  = rx_s;
  assign wr_row   = RW'(rx_cnt);
  assign wr_data  = in.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_act <= 1'b0; rx_s <= '0; rx_cnt <= '0; rx_done <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      if (!rx_act && rx_start) begin
        rx_act <= 1'b1; rx_s <= rx_slot; rx_cnt <= '0;
      end else if (wr_en) begin
        rx_cnt <= rx_cnt + 1'b1;
        if (rx_cnt + 1'b1 == nrows) begin rx_act <= 1'b0; rx_done <= 1'b1; end
      end
    end
  end
  assign rx_busy = rx_act;

endmodule
