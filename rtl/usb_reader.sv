// USB reader: brings the USB adapter's byte bus into the 65 MHz video clock
// domain.
//
// The adapter presents an 8-bit data bus and a strobe that are asynchronous
// to the FPGA clock. Both pass through a two-flop synchroniser; a rising edge
// of the synchronised strobe captures the synchronised data and emits it as a
// one-cycle byte_valid pulse, two to three clocks after the strobe rises. The
// sender must hold data stable from before the strobe rises until it falls,
// and keep the strobe high and low for at least three clocks each.
//
// That the data passes a synchroniser before reaching memory follows the
// design's description; the strobe protocol and its timing are this
// design's own choice, since the adapter's handshake is not specified.
module usb_reader (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] usb_data,    // asynchronous data pins
  input  logic       usb_strobe,  // asynchronous, data valid while high
  output logic [7:0] byte_data,
  output logic       byte_valid
);

  logic [7:0] data_s1, data_s2;
  logic       stb_s1, stb_s2, stb_s3;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_s1    <= '0;
      data_s2    <= '0;
      stb_s1     <= 1'b0;
      stb_s2     <= 1'b0;
      stb_s3     <= 1'b0;
      byte_data  <= '0;
      byte_valid <= 1'b0;
    end else begin
      data_s1    <= usb_data;
      data_s2    <= data_s1;
      stb_s1     <= usb_strobe;
      stb_s2     <= stb_s1;
      stb_s3     <= stb_s2;
      byte_valid <= stb_s2 & ~stb_s3;
      if (stb_s2 & ~stb_s3) byte_data <= data_s2;
    end
  end

endmodule
