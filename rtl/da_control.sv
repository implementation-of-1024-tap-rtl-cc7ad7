// da_control: sequencer of the bit-serial DA filter.
//
// One input sample takes DATA_W clocks, one per bit position. The
// controller accepts a sample (in_valid && in_ready) by pulsing load, which
// moves the delay line by one tap; over the next DATA_W clocks it is busy
// and raises acc_en, with first on the clock of the most significant bit
// and last on the clock of the least significant bit, and pulses shift on
// all but the last of them. in_ready is high when idle and on the last bit
// clock, so a new sample can be loaded while the last bit of the previous
// one is being added: with in_valid held high the filter takes one sample
// and delivers one result every DATA_W clocks. Without a new sample the
// controller goes idle after the last bit.
// clken is the clock enable: while it is low nothing advances, in_ready is
// low and no control pulse is given. Active-low asynchronous reset makes the
// controller idle.
// The clock enable and the N clocks per N-bit sample follow the design; the
// valid/ready handshake and the overlap of load and last bit are this
// implementation's choices.
module da_control #(
  parameter int DATA_W = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clken,
  input  logic in_valid,
  output logic in_ready,
  output logic load,
  output logic shift,
  output logic acc_en,
  output logic first,
  output logic last,
  output logic busy
);
  localparam int CW = (DATA_W > 1) ? $clog2(DATA_W) : 1;

  logic [CW-1:0] bit_cnt;

  assign first    = busy && (bit_cnt == '0);
  assign last     = busy && (bit_cnt == CW'(DATA_W - 1));
  assign in_ready = clken && (!busy || last);
  assign load     = in_valid && in_ready;
  assign acc_en   = clken && busy;
  assign shift    = clken && busy && !last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      bit_cnt <= '0;
    end else if (clken) begin
      if (load) begin
        busy    <= 1'b1;
        bit_cnt <= '0;
      end else if (busy) begin
        if (last) busy <= 1'b0;
        else      bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  // A sample is only loaded when the controller can take it, and the
  // bit counter never passes the last bit.
  a_load_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> in_ready);
  a_cnt_range:  assert property (@(posedge clk) disable iff (!rst_n) bit_cnt <= CW'(DATA_W - 1));
endmodule
