// forwarder: moves one outgoing cell per start command into the 16-bit
// utopia transmitter towards the bus device, from one of two sources of
// different widths.
//
// Handshake with the sender (from the document): `fw_ready` is high while the
// forwarder is idle; a one-cycle `fw_start` with `fw_cltype` starts it and
// clears `fw_ready` at once; `fw_ready` rises again when the whole cell has
// been written. A data cell comes from the 64-bit cell dequeue FIFO (seven
// words, the sixteen-bit cell words in order from the top bits of each word,
// the lower half of the seventh word unused). A control/RM cell comes from
// the byte FIFO of the 8-bit utopia receiver (52 bytes, first byte in the
// upper half of each 16-bit word); after it the forwarder pulses `rm_celldec`.
//
// Timing: after `fw_start` the forwarder waits for `cellspc`, pulses
// `cellinc` and then writes one 16-bit word per cycle from the dequeue FIFO,
// or one per two cycles from the byte FIFO, stalling whenever the source
// FIFO is empty (the byte FIFO holds a whole cell before it is started). `ctrl_avail` tells the sender a control cell is waiting: it
// is the receiver's `rm_cellav`, masked while a control cell is being sent
// and for HOLDOFF cycles after `rm_celldec`, the time the receiver's
// synchronised cell counter needs to follow. The width adaptation is the
// document's; the word order, the hold-off and the cell-level wait for
// `cellspc` are this design's choices.
module forwarder
  import abr_pkg::*;
#(
  parameter int unsigned HOLDOFF = 16
) (
  input  logic        clk,
  input  logic        aclr,
  // sender
  input  logic        fw_start,
  input  cell_type_e  fw_cltype,
  output logic        fw_ready,
  output logic        ctrl_avail,
  // 64-bit cell dequeue FIFO (show-ahead)
  output logic        dq_rdreq,
  input  logic [63:0] dq_data,
  input  logic        dq_empty,
  // 8-bit utopia receiver (control/RM cells from the cell processor)
  output logic        rm_rdreq,
  input  logic [7:0]  rm_data,
  input  logic        rm_cellav,
  output logic        rm_celldec,
  // 16-bit utopia transmitter towards the bus device
  input  logic        cellspc,
  output logic        cellinc,
  output logic        tx_wrreq,
  output logic [15:0] tx_data
);
  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_SEND, F_DONE} fstate_e;

  fstate_e    state;
  cell_type_e cltype;
  logic [4:0] word_idx;      // 16-bit word of the cell
  logic       half;          // byte source: high byte already taken
  logic [7:0] hi_byte;
  logic [$clog2(HOLDOFF+1)-1:0] hold;
  logic       word_ok, last_word;

  assign last_word = (word_idx == 5'(CELL_WORDS16 - 1));

  always_comb begin
    dq_rdreq = 1'b0;
    rm_rdreq = 1'b0;
    tx_wrreq = 1'b0;
    tx_data  = '0;
    word_ok  = 1'b0;
    if (state == F_SEND) begin
      if (cltype == CL_DATA) begin
        word_ok  = !dq_empty;
        tx_wrreq = word_ok;
        tx_data  = dq_data[63 - 16*word_idx[1:0] -: 16];
        dq_rdreq = word_ok && (word_idx[1:0] == 2'd3 || last_word);
      end else begin
        // a whole cell is stored before rm_cellav rises: one byte a cycle
        rm_rdreq = 1'b1;
        word_ok  = half;
        tx_wrreq = half;
        tx_data  = {hi_byte, rm_data};
      end
    end
  end

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) begin
      state      <= F_IDLE;
      cltype     <= CL_DATA;
      fw_ready   <= 1'b0;
      word_idx   <= '0;
      half       <= 1'b0;
      hi_byte    <= '0;
      hold       <= '0;
      cellinc    <= 1'b0;
      rm_celldec <= 1'b0;
      ctrl_avail <= 1'b0;
    end else begin
      cellinc    <= 1'b0;
      rm_celldec <= 1'b0;
      if (hold != '0) hold <= hold - 1'b1;
      ctrl_avail <= rm_cellav && (hold == '0) && !rm_celldec
                    && !(state != F_IDLE && cltype == CL_CTRL) && !(fw_start && fw_cltype == CL_CTRL);
      unique case (state)
        F_IDLE: begin
          fw_ready <= 1'b1;
          if (fw_start) begin
            fw_ready <= 1'b0;
            cltype   <= fw_cltype;
            state    <= F_WAIT;
          end
        end
        F_WAIT: if (cellspc) begin
          cellinc  <= 1'b1;
          word_idx <= '0;
          half     <= 1'b0;
          state    <= F_SEND;
        end
        F_SEND: begin
          if (cltype == CL_CTRL && !half) begin
            hi_byte <= rm_data;
            half    <= 1'b1;
          end else if (word_ok) begin
            half     <= 1'b0;
            word_idx <= word_idx + 1'b1;
            if (last_word) state <= F_DONE;
          end
        end
        F_DONE: begin
          if (cltype == CL_CTRL) begin
            rm_celldec <= 1'b1;
            hold       <= ($clog2(HOLDOFF+1))'(HOLDOFF);
          end
          fw_ready <= 1'b1;
          state    <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  // the sender starts the forwarder only while it is ready
  a_start_when_ready: assert property (@(posedge clk) disable iff (aclr) fw_start |-> fw_ready);
endmodule
