// deadtime_regs: td_on / td_off registers with a serial write port.
//
// The two deadtimes of the synchronous rectifier signal are held in
// registers that an external controller writes over a three-wire serial
// port: while cs_n is low, each rising edge of sclk shifts one bit of sdi in,
// most significant bit first; a frame is td_on followed by td_off, 2*DT_W
// bits. When cs_n goes high after exactly 2*DT_W bits the new values are
// taken; a frame of any other length is ignored. The registers reset to
// TD_ON_RST and TD_OFF_RST.
//
// The three serial inputs are asynchronous to clk and pass through two-flop
// synchronisers, so sclk may run at most at a quarter of the clock rate.
// New values appear at td_on/td_off four clocks after cs_n rises. That the
// deadtimes sit in externally programmable registers follows the reference
// design; the frame format, the bit order and the reset values are this
// design's own choices.
module deadtime_regs #(
  parameter int unsigned DT_W = dpwm_pkg::DT_W,
  parameter logic [DT_W-1:0] TD_ON_RST  = DT_W'(4),
  parameter logic [DT_W-1:0] TD_OFF_RST = DT_W'(4)
) (
  input  logic            clk,
  input  logic            rst_n,   // asynchronous, active low
  input  logic            sclk,    // serial clock
  input  logic            sdi,     // serial data in
  input  logic            cs_n,    // frame select, active low
  output logic [DT_W-1:0] td_on,
  output logic [DT_W-1:0] td_off,
  output logic            updated  // one clock: new values taken
);
  localparam int unsigned FRAME = 2 * DT_W;
  localparam int unsigned CNT_W = $clog2(FRAME + 1);

  logic [2:0]       sclk_s, cs_s;   // [0],[1] synchroniser, [2] previous
  logic [1:0]       sdi_s;
  logic [FRAME-1:0] shreg;
  logic [CNT_W-1:0] nbits;
  logic             sclk_rise, cs_rise, selected;

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign cs_rise   = cs_s[1] && !cs_s[2];
  assign selected  = !cs_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s  <= '0;
      cs_s    <= '1;
      sdi_s   <= '0;
      shreg   <= '0;
      nbits   <= '0;
      td_on   <= TD_ON_RST;
      td_off  <= TD_OFF_RST;
      updated <= 1'b0;
    end else begin
      sclk_s  <= {sclk_s[1:0], sclk};
      cs_s    <= {cs_s[1:0], cs_n};
      sdi_s   <= {sdi_s[0], sdi};
      updated <= 1'b0;
      if (cs_rise) begin
        if (nbits == CNT_W'(FRAME)) begin
          td_on   <= shreg[FRAME-1:DT_W];
          td_off  <= shreg[DT_W-1:0];
          updated <= 1'b1;
        end
        nbits <= '0;
      end else if (selected && sclk_rise) begin
        shreg <= {shreg[FRAME-2:0], sdi_s[1]};
        if (nbits != '1) nbits <= nbits + 1'b1;
      end
    end
  end
endmodule
