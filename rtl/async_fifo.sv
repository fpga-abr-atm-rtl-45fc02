// async_fifo: dual-clock FIFO used inside the utopia interfaces, where the
// utopia link clock differs from the internal clock. Write and read pointers
// are kept in Gray code and each is carried into the other clock domain
// through two flip-flops, so `wfull` and `rempty` are conservative (they clear
// a few cycles late). DEPTH must be a power of two. `rdata` shows the head
// entry while `rempty` is low; `rdreq` advances it. Both sides are cleared by
// `aclr`. This is the conventional Gray-pointer structure; the document only
// says that the interfaces use a FIFO crossing the two clocks.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             aclr,
  input  logic             wclk,
  input  logic             wrreq,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rdreq,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_n = wbin + (AW+1)'(wrreq && !wfull);
  assign rbin_n = rbin + (AW+1)'(rdreq && !rempty);

  always_ff @(posedge wclk) begin
    if (wrreq && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or posedge aclr) begin
    if (aclr) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n;
      wgray <= b2g(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk or posedge aclr) begin
    if (aclr) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n;
      rgray <= b2g(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign wfull  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
endmodule
