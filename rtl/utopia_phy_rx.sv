// utopia_phy_rx: 16-bit physical-layer-side utopia receiver that takes the
// cells the bus device delivers (cells of 26 16-bit words).
//
// Utopia side (clock `coclk`): `coclav` tells the bus device there is room
// for a whole cell; a word is taken on each coclk edge where `coenb_n` is low,
// `cosoc` marking the first word. The word counter (modulo 26) is cleared
// synchronously by `cosoc`; a `cosoc` in the middle of a cell is a start-of-
// cell error, reported by one `socerr` pulse in the internal clock domain (the
// partial cell's words stay in the FIFO). Reception is store-and-forward: the
// cell counter is incremented only when the last word of a cell has been
// written.
//
// Internal side (clock `clk`): `cellav` (cell counter not zero, synchronised)
// says a complete cell can be read; the reader takes its 26 words with
// `rdreq` (`data` shows the head word) and pulses `celldec`, which after
// synchronisation decrements the cell counter. `cellav` reflects a `celldec`
// only a few cycles later, so a reader waits for it to settle between cells.
// FIFO size (256 words) and the one-cell margin of `coclav` are this design's
// choices; the counters, synchronisers and signal names follow the document.
module utopia_phy_rx
  import abr_pkg::*;
#(
  parameter int unsigned FIFO_WORDS = 256,
  localparam int unsigned MAX_CELLS = FIFO_WORDS / CELL_WORDS16
) (
  input  logic        clk,
  input  logic        reset,
  // internal side
  input  logic        rdreq,
  output logic [15:0] data,
  output logic        cellav,
  input  logic        celldec,
  output logic        socerr,
  // utopia side
  input  logic        coclk,
  output logic        coclav,
  input  logic        coenb_n,
  input  logic        cosoc,
  input  logic [15:0] codata
);
  logic        wfull, rempty, wrreq;
  logic        cell_increase, cell_decrease, cell_available;
  logic [3:0]  cell_cnt;
  logic [4:0]  word_cnt;
  logic        soc_error;
  logic [4:0]  word_pos;

  async_fifo #(.WIDTH(16), .DEPTH(FIFO_WORDS)) u_fifo (
    .aclr(reset), .wclk(coclk), .wrreq(wrreq), .wdata(codata), .wfull(wfull),
    .rclk(clk), .rdreq(rdreq), .rdata(data), .rempty(rempty));

  synchro_pulse u_dec (.sclk(clk), .dclk(coclk), .aclr(reset), .din(celldec), .dout(cell_decrease));
  synchro_pulse u_err (.sclk(coclk), .dclk(clk), .aclr(reset), .din(soc_error), .dout(socerr));
  synchro       u_av  (.dclk(clk), .aclr(reset), .din(cell_available), .dout(cellav));

  assign wrreq          = !coenb_n;
  assign word_pos       = cosoc ? '0 : word_cnt;       // cosoc clears the count
  assign cell_increase  = wrreq && (word_pos == 5'(CELL_WORDS16 - 1));
  assign cell_available = (cell_cnt != '0);

  always_ff @(posedge coclk or posedge reset) begin
    if (reset) begin
      cell_cnt  <= '0;
      word_cnt  <= '0;
      soc_error <= 1'b0;
      coclav    <= 1'b0;
    end else begin
      cell_cnt  <= cell_cnt + 4'(cell_increase) - 4'(cell_decrease);
      soc_error <= wrreq && cosoc && (word_cnt != '0);
      if (wrreq) word_cnt <= (word_pos == 5'(CELL_WORDS16 - 1)) ? '0 : word_pos + 1'b1;
      coclav <= (cell_cnt + 4'(cell_increase) < 4'(MAX_CELLS - 1));
    end
  end

  a_no_overflow:  assert property (@(posedge coclk) disable iff (reset) !(wrreq && wfull));
  a_no_underflow: assert property (@(posedge clk) disable iff (reset) !(rdreq && rempty));
endmodule
