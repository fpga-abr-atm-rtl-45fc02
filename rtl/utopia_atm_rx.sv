// utopia_atm_rx: 8-bit ATM-layer-side utopia receiver that takes cells
// (52 bytes each) from the cell processor, which plays the physical layer.
//
// Utopia side (clock `rxclk`): as the ATM layer this interface drives the
// enable. When it has room for a whole cell and the cell processor shows
// `rxclav`, it holds `rxenb_n` low for 52 rxclk edges; the cell processor
// puts a byte on `rxdata` (with `rxsoc` on the first) after each edge at which
// it saw the enable low, so a byte is stored one edge after each enable edge.
// The word counter (modulo 52) is cleared by `rxsoc`; an `rxsoc` inside a cell
// is reported by a `socerr` pulse. Reception is store-and-forward: the cell
// counter is incremented when the last byte is stored.
//
// Internal side (clock `clk`): `cellav` says a whole cell is held; the reader
// (the forwarder) takes its bytes with `rdreq` (`data` shows the head byte)
// and pulses `celldec` when done. The counters and synchronisers follow the
// document; the pin names are the utopia standard's; FIFO size and the
// cell-at-a-time enable are this design's choices.
module utopia_atm_rx
  import abr_pkg::*;
#(
  parameter int unsigned FIFO_BYTES = 256,
  localparam int unsigned MAX_CELLS = FIFO_BYTES / CELL_BYTES
) (
  input  logic       clk,
  input  logic       reset,
  // internal side
  input  logic       rdreq,
  output logic [7:0] data,
  output logic       cellav,
  input  logic       celldec,
  output logic       socerr,
  // utopia side
  input  logic       rxclk,
  input  logic       rxclav,
  output logic       rxenb_n,
  input  logic       rxsoc,
  input  logic [7:0] rxdata
);
  logic       wfull, rempty, wrreq;
  logic       cell_increase, cell_decrease, cell_available;
  logic [3:0] cell_cnt;
  logic [5:0] word_cnt, word_pos, enb_cnt;
  logic       dly_enb_n, soc_error, room;

  async_fifo #(.WIDTH(8), .DEPTH(FIFO_BYTES)) u_fifo (
    .aclr(reset), .wclk(rxclk), .wrreq(wrreq), .wdata(rxdata), .wfull(wfull),
    .rclk(clk), .rdreq(rdreq), .rdata(data), .rempty(rempty));

  synchro_pulse u_dec (.sclk(clk), .dclk(rxclk), .aclr(reset), .din(celldec), .dout(cell_decrease));
  synchro_pulse u_err (.sclk(rxclk), .dclk(clk), .aclr(reset), .din(soc_error), .dout(socerr));
  synchro       u_av  (.dclk(clk), .aclr(reset), .din(cell_available), .dout(cellav));

  assign wrreq          = !dly_enb_n;
  assign word_pos       = rxsoc ? '0 : word_cnt;
  assign cell_increase  = wrreq && (word_pos == 6'(CELL_BYTES - 1));
  assign cell_available = (cell_cnt != '0);
  // cells stored or being received, against the FIFO's capacity
  assign room           = (cell_cnt + 4'(enb_cnt != '0 || word_cnt != '0 || !dly_enb_n)) < 4'(MAX_CELLS);

  always_ff @(posedge rxclk or posedge reset) begin
    if (reset) begin
      cell_cnt  <= '0;
      word_cnt  <= '0;
      enb_cnt   <= '0;
      rxenb_n   <= 1'b1;
      dly_enb_n <= 1'b1;
      soc_error <= 1'b0;
    end else begin
      dly_enb_n <= rxenb_n;
      cell_cnt  <= cell_cnt + 4'(cell_increase) - 4'(cell_decrease);
      soc_error <= wrreq && rxsoc && (word_cnt != '0);
      if (wrreq) word_cnt <= (word_pos == 6'(CELL_BYTES - 1)) ? '0 : word_pos + 1'b1;
      if (enb_cnt != '0) begin
        enb_cnt <= enb_cnt - 1'b1;
        rxenb_n <= (enb_cnt == 6'd1);
      end else if (rxenb_n && dly_enb_n && word_cnt == '0 && rxclav && room) begin
        enb_cnt <= 6'(CELL_BYTES);
        rxenb_n <= 1'b0;
      end
    end
  end

  a_no_overflow:  assert property (@(posedge rxclk) disable iff (reset) !(wrreq && wfull));
  a_no_underflow: assert property (@(posedge clk) disable iff (reset) !(rdreq && rempty));
endmodule
