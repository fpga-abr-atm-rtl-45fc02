// utopia_atm_tx: 8-bit ATM-layer-side utopia transmitter that passes cells
// (52 bytes each) to the cell processor, which plays the physical layer.
//
// Internal side (clock `clk`): the writer (the demultiplexer) waits for
// `cellspc`, pulses `cellinc` as it begins a cell and writes its bytes with
// `wrreq`/`data`. Utopia side (clock `txclk`): as the ATM layer this
// interface drives the enable. At a cell boundary it starts a cell when the
// cell processor shows `txclav` and a cell is held (cut-through: counted from
// `cellinc`, so its first bytes may still be arriving); then it sends one byte
// per txclk edge with `txenb_n` low, `txsoc` on the first byte. If the FIFO
// runs dry in the middle of a cell the enable is lifted for that edge and the
// cell resumes. `txenb_n`, `txsoc` and `txdata` are registered.
//
// The word and cell counters, the synchronisers and the cut-through policy
// follow the document; the 8-bit pin names are the utopia standard's, and the
// FIFO size (256 bytes, one embedded block) is this design's choice.
module utopia_atm_tx
  import abr_pkg::*;
#(
  parameter int unsigned FIFO_BYTES = 256,
  localparam int unsigned MAX_CELLS = FIFO_BYTES / CELL_BYTES
) (
  input  logic       clk,
  input  logic       reset,
  // internal side
  input  logic       wrreq,
  input  logic [7:0] data,
  input  logic       cellinc,
  output logic       cellspc,
  // utopia side
  input  logic       txclk,
  input  logic       txclav,
  output logic       txenb_n,
  output logic       txsoc,
  output logic [7:0] txdata
);
  logic       wfull, rempty, rdreq;
  logic [7:0] rdata;
  logic       cell_increase, cell_decrease, cell_space;
  logic [3:0] cell_cnt;
  logic [5:0] word_cnt;
  logic       send;

  async_fifo #(.WIDTH(8), .DEPTH(FIFO_BYTES)) u_fifo (
    .aclr(reset), .wclk(clk), .wrreq(wrreq), .wdata(data), .wfull(wfull),
    .rclk(txclk), .rdreq(rdreq), .rdata(rdata), .rempty(rempty));

  synchro_pulse u_inc (.sclk(clk), .dclk(txclk), .aclr(reset), .din(cellinc), .dout(cell_increase));
  synchro       u_spc (.dclk(clk), .aclr(reset), .din(cell_space), .dout(cellspc));

  // a byte is sent inside a started cell, or as the first byte of a new cell
  // when the cell processor has room
  assign send          = !rempty && ((word_cnt != '0) || (cell_cnt != '0 && txclav));
  assign rdreq         = send;
  assign cell_decrease = send && (word_cnt == 6'(CELL_BYTES - 1));
  assign cell_space    = (cell_cnt < 4'(MAX_CELLS - 1));

  always_ff @(posedge txclk or posedge reset) begin
    if (reset) begin
      cell_cnt <= '0;
      word_cnt <= '0;
      txenb_n  <= 1'b1;
      txsoc    <= 1'b0;
      txdata   <= '0;
    end else begin
      cell_cnt <= cell_cnt + 4'(cell_increase) - 4'(cell_decrease);
      txenb_n  <= !send;
      txsoc    <= send && (word_cnt == '0);
      if (send) begin
        txdata   <= rdata;
        word_cnt <= (word_cnt == 6'(CELL_BYTES - 1)) ? '0 : word_cnt + 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (reset) !(wrreq && wfull));
endmodule
