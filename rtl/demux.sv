// demux: distributes the cells received from the bus device. RM cells are
// passed, when `rm_to_cp` is set, to the 8-bit utopia transmitter towards the
// cell processor; all other cells are packed into the 64-bit cell enqueue
// FIFO, from which the queue manager stores them.
//
// It waits until the 16-bit utopia receiver shows a whole cell (`rx_cellav`),
// the enqueue FIFO can take a whole cell (`enq_room`) and the cell-processor
// transmitter has room for one (`tm_cellspc`). It then reads the first two
// words (header bytes H1..H4) and looks at the payload type in H4: PTI
// (bits 3..1 of H4) equal to 110 marks an RM cell. A cell for the cell
// processor is written one byte per cycle (high byte of each word first)
// after a `tm_cellinc` pulse; a cell for the queue manager is written as
// seven 64-bit words, the sixteen-bit words in order from the top bits, the
// lower half of the last word zero. After the last word it pulses
// `rx_celldec` and waits HOLDOFF cycles, the time the receiver's synchronised
// cell counter needs to follow, before it looks at `rx_cellav` again.
//
// The routing follows the document; RM cells not passed to the cell
// processor are enqueued like data cells, and the packing, the hold-off and
// the PTI test (standard ATM header) are this design's choices.
module demux
  import abr_pkg::*;
#(
  parameter int unsigned HOLDOFF = 16
) (
  input  logic        clk,
  input  logic        aclr,
  input  logic        rm_to_cp,     // pass RM cells to the cell processor
  // 16-bit utopia receiver from the bus device
  output logic        rx_rdreq,
  input  logic [15:0] rx_data,
  input  logic        rx_cellav,
  output logic        rx_celldec,
  // 8-bit utopia transmitter towards the cell processor
  output logic        tm_wrreq,
  output logic [7:0]  tm_data,
  input  logic        tm_cellspc,
  output logic        tm_cellinc,
  // 64-bit cell enqueue FIFO
  output logic        enq_wrreq,
  output logic [63:0] enq_data,
  input  logic        enq_room,     // room for a whole cell
  // events
  output logic        ev_rm_cell,
  output logic        ev_data_cell
);
  typedef enum logic [2:0] {D_IDLE, D_HDR0, D_HDR1, D_BODY, D_DONE} dstate_e;

  dstate_e     state;
  logic [15:0] w0, w1, cur;
  logic [47:0] pack;
  logic [4:0]  idx;
  logic        to_cp, phase;
  logic [$clog2(HOLDOFF+1)-1:0] hold;
  logic        last_word;

  assign last_word = (idx == 5'(CELL_WORDS16 - 1));
  assign cur       = (idx == 5'd0) ? w0 : (idx == 5'd1) ? w1 : rx_data;

  always_comb begin
    rx_rdreq  = 1'b0;
    tm_wrreq  = 1'b0;
    tm_data   = '0;
    enq_wrreq = 1'b0;
    enq_data  = '0;
    unique case (state)
      D_HDR0, D_HDR1: rx_rdreq = 1'b1;
      D_BODY: begin
        if (to_cp) begin
          tm_wrreq = 1'b1;
          tm_data  = phase ? cur[7:0] : cur[15:8];
          rx_rdreq = phase && (idx > 5'd1);
        end else begin
          rx_rdreq  = (idx > 5'd1);
          enq_wrreq = (idx[1:0] == 2'd3) || last_word;
          enq_data  = last_word ? {pack[15:0], cur, 32'h0} : {pack, cur};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) begin
      state        <= D_IDLE;
      w0           <= '0;
      w1           <= '0;
      pack         <= '0;
      idx          <= '0;
      to_cp        <= 1'b0;
      phase        <= 1'b0;
      hold         <= '0;
      rx_celldec   <= 1'b0;
      tm_cellinc   <= 1'b0;
      ev_rm_cell   <= 1'b0;
      ev_data_cell <= 1'b0;
    end else begin
      rx_celldec   <= 1'b0;
      tm_cellinc   <= 1'b0;
      ev_rm_cell   <= 1'b0;
      ev_data_cell <= 1'b0;
      if (hold != '0) hold <= hold - 1'b1;
      unique case (state)
        D_IDLE: if (rx_cellav && hold == '0 && enq_room && tm_cellspc) state <= D_HDR0;
        D_HDR0: begin
          w0    <= rx_data;
          state <= D_HDR1;
        end
        D_HDR1: begin
          w1         <= rx_data;
          to_cp      <= rm_to_cp && (rx_data[3:1] == 3'b110);
          tm_cellinc <= rm_to_cp && (rx_data[3:1] == 3'b110);
          idx        <= '0;
          phase      <= 1'b0;
          state      <= D_BODY;
        end
        D_BODY: begin
          if (to_cp) phase <= !phase;
          if (!to_cp || phase) begin
            pack <= {pack[31:0], cur};
            idx  <= idx + 1'b1;
            if (last_word) state <= D_DONE;
          end
        end
        D_DONE: begin
          rx_celldec   <= 1'b1;
          ev_rm_cell   <= to_cp;
          ev_data_cell <= !to_cp;
          hold         <= ($clog2(HOLDOFF+1))'(HOLDOFF);
          state        <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
