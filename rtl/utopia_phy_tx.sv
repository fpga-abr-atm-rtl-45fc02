// utopia_phy_tx: 16-bit physical-layer-side utopia transmitter that hands
// outgoing cells to the bus device (cells of 26 16-bit words).
//
// Internal side (clock `clk`): the forwarder waits for `cellspc` (room for at
// least one more cell), pulses `cellinc` when it begins a cell and writes its
// words with `wrreq`/`data`. Utopia side (clock `ciclk`): `ciclav` tells the
// bus device a cell is available; while it holds `cienb_n` low the interface
// delivers one word per ciclk edge on `cidata`, with `cisoc` marking the first
// word of a cell. The sampled enable (`dly_cienb_n`) drives the word transfer,
// so the first word follows the enable by one edge, as in the utopia timing
// diagrams. Transmission is cut-through: a cell is counted as soon as the
// forwarder begins it.
//
// Two counters live in the utopia clock domain, as in the document's block
// diagram: the word counter (modulo 26) and the cell counter of cells held in
// the FIFO, incremented by the synchronised `cellinc` and decremented when the
// last word of a cell leaves. `cellspc` is the cell counter's "room" flag
// synchronised back to `clk`. FIFO size (256 words, one embedded block) and
// the one-cell margin are this design's choices.
module utopia_phy_tx
  import abr_pkg::*;
#(
  parameter int unsigned FIFO_WORDS = 256,
  localparam int unsigned MAX_CELLS = FIFO_WORDS / CELL_WORDS16
) (
  input  logic        clk,
  input  logic        reset,
  // internal side
  input  logic        wrreq,
  input  logic [15:0] data,
  input  logic        cellinc,
  output logic        cellspc,
  // utopia side
  input  logic        ciclk,
  output logic        ciclav,
  input  logic        cienb_n,
  output logic        cisoc,
  output logic [15:0] cidata
);
  logic        wfull, rempty, rdreq;
  logic [15:0] rdata;
  logic        cell_increase, cell_decrease, cell_space;
  logic [3:0]  cell_cnt;
  logic [4:0]  word_cnt;
  logic        dly_cienb_n;
  logic        word_accept;

  async_fifo #(.WIDTH(16), .DEPTH(FIFO_WORDS)) u_fifo (
    .aclr(reset), .wclk(clk), .wrreq(wrreq), .wdata(data), .wfull(wfull),
    .rclk(ciclk), .rdreq(rdreq), .rdata(rdata), .rempty(rempty));

  synchro_pulse u_inc (.sclk(clk), .dclk(ciclk), .aclr(reset), .din(cellinc), .dout(cell_increase));
  synchro       u_spc (.dclk(clk), .aclr(reset), .din(cell_space), .dout(cellspc));

  // a word leaves when the bus device enabled the transfer, a cell is under
  // way or available, and its word has been written
  assign word_accept   = !dly_cienb_n && ((word_cnt != '0) || (cell_cnt != '0)) && !rempty;
  assign rdreq         = word_accept;
  assign cell_decrease = word_accept && (word_cnt == 5'(CELL_WORDS16 - 1));
  assign cell_space    = (cell_cnt < 4'(MAX_CELLS - 1));

  always_ff @(posedge ciclk or posedge reset) begin
    if (reset) begin
      dly_cienb_n <= 1'b1;
      cell_cnt    <= '0;
      word_cnt    <= '0;
      cisoc       <= 1'b0;
      cidata      <= '0;
      ciclav      <= 1'b0;
    end else begin
      dly_cienb_n <= cienb_n;
      cell_cnt    <= cell_cnt + 4'(cell_increase) - 4'(cell_decrease);
      cisoc       <= word_accept && (word_cnt == '0);
      if (word_accept) begin
        cidata   <= rdata;
        word_cnt <= (word_cnt == 5'(CELL_WORDS16 - 1)) ? '0 : word_cnt + 1'b1;
      end
      // a further cell is announced only when one beyond the current is held
      ciclav <= (cell_cnt - 4'(cell_decrease) + 4'(cell_increase)) > ((word_cnt != '0 && !cell_decrease) ? 4'd1 : 4'd0);
    end
  end

  // the forwarder respects cellspc, so the word FIFO never overflows
  a_no_overflow: assert property (@(posedge clk) disable iff (reset) !(wrreq && wfull));
endmodule
