// codec_audio_model: behavioural model of the codec's serial audio port.
//
// Not synthesizable; for testbenches only. The codec is a clock slave in
// left-justified, 16-bit mode: a new channel starts at each L/R clock edge
// (high = left), the codec puts the MSB of its ADC word on adcdat at that
// edge and the following bits on falling bit-clock edges, and it reads dacdat
// on rising bit-clock edges. Left ADC words are taken from the adc_left queue
// (0 when it is empty) and logged in sent_left; the right channel sends
// RIGHT_WORD. The first 16 DAC bits of every channel are collected in
// dac_left / dac_right.
module codec_audio_model #(
  parameter logic [15:0] RIGHT_WORD = 16'h5A5A
) (
  input  logic bclk,
  input  logic lrck,
  input  logic dacdat,
  output logic adcdat
);
  logic [15:0] adc_left [$];
  logic [15:0] dac_left [$];
  logic [15:0] dac_right [$];
  logic [15:0] sent_left [$];   // every left ADC word actually sent
  logic        last_lrck = 0;
  logic [15:0] word = '0, rx = '0;
  int          txn = 16, rxn = 16;
  logic        ch_left = 0;

  initial adcdat = 0;

  always @(negedge bclk) begin
    if (lrck != last_lrck) begin
      last_lrck = lrck;
      ch_left   = lrck;
      txn = 0;
      rxn = 0;
      if (lrck) begin
        word = (adc_left.size() > 0) ? adc_left.pop_front() : 16'h0000;
        sent_left.push_back(word);
      end else word = RIGHT_WORD;
    end
    adcdat = (txn < 16) ? word[15 - txn] : 1'b0;
  end

  always @(posedge bclk) begin
    if (txn < 16) txn++;
    if (rxn < 16) begin
      rx = {rx[14:0], dacdat};
      rxn++;
      if (rxn == 16) begin
        if (ch_left) dac_left.push_back(rx);
        else         dac_right.push_back(rx);
      end
    end
  end
endmodule
