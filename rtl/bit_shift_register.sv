// bit_shift_register: the DA address generator.
//
// It holds one IN_W-bit word per tap. A frame of N_TAPS samples is loaded in
// parallel through a valid/ready handshake; from the next cycle on, all words
// are shifted one bit to the right per clock, so that bit j (LSB first) of every
// word is presented together as the N_TAPS-bit table address addr, where
// addr[k] belongs to word k. A frame therefore occupies IN_W cycles.
//
// Timing: the frame is accepted on the clock edge where load_valid and
// load_ready are both high. Bit 0 is on addr in the following cycle, with
// addr_valid and addr_first high; bit IN_W-1 is there IN_W-1 cycles later with
// addr_last high. load_ready is high when the register is idle and also during
// the last bit of a frame, so that frames can follow each other without a gap.
// Reset empties the register.
//
// LSB-first bit slicing as the table address is the DA method; the handshake
// and the ready-on-last-bit rule are choices of this design.
module bit_shift_register #(
  parameter int N_TAPS = da_fir_pkg::FIR_TAPS,
  parameter int IN_W   = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // parallel load from the sample buffer
  input  logic                      load_valid,
  output logic                      load_ready,
  input  logic [IN_W-1:0]           load_data [N_TAPS],
  // bit-slice address, one bit per tap
  output logic                      addr_valid,
  output logic                      addr_first,
  output logic                      addr_last,
  output logic [N_TAPS-1:0]         addr
);

  localparam int CNT_W = $clog2(IN_W + 1);

  logic [IN_W-1:0]  words [N_TAPS];
  logic [CNT_W-1:0] cnt;
  logic             busy;
  logic             last;

  assign last       = busy && (cnt == CNT_W'(IN_W - 1));
  assign load_ready = !busy || last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      for (int k = 0; k < N_TAPS; k++) words[k] <= '0;
    end else if (load_valid && load_ready) begin
      busy  <= 1'b1;
      cnt   <= '0;
      words <= load_data;
    end else if (busy) begin
      for (int k = 0; k < N_TAPS; k++) words[k] <= words[k] >> 1;
      cnt <= cnt + 1'b1;
      if (last) busy <= 1'b0;
    end
  end

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) addr[k] = words[k][0];
  end

  assign addr_valid = busy;
  assign addr_first = busy && (cnt == '0);
  assign addr_last  = last;

  initial begin
    assert (IN_W >= 2) else $error("bit_shift_register: IN_W must be at least 2");
  end

endmodule
