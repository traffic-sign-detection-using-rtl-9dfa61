// i2c_slave_model -- behavioural I2C slave for simulation only.
//
// Watches the open-drain bus (scl, sda as seen on the wires). START and STOP
// are SDA edges while SCL is high; data bits are taken on SCL rising edges.
// After each byte the slave pulls SDA low for the ninth clock if the first
// byte carried its address ADDR with R/W = 0. Every completed write frame is
// pushed into frames as {byte0, byte1, byte2} when it has three bytes.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h42
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  logic [23:0] frames [$];
  int unsigned n_start = 0, n_stop = 0;
  bit          active = 0, addressed = 0;
  int          nbits = 0, nbytes = 0;
  logic [7:0]  sh = '0;
  logic [23:0] acc = '0;

  initial sda_oe = 1'b0;

  always @(negedge sda) if (scl) begin
    active = 1; addressed = 0; nbits = 0; nbytes = 0; acc = '0; n_start++;
  end

  always @(posedge sda) if (scl && active) begin
    if (addressed && nbytes == 3) frames.push_back(acc);
    active = 0; n_stop++;
  end

  always @(posedge scl) if (active && nbits < 8) begin
    sh = {sh[6:0], sda}; nbits++;
  end else if (active) begin
    nbits++;
  end

  always @(negedge scl) if (active) begin
    if (nbits == 8) begin
      if (nbytes == 0) addressed = sh[7:1] == ADDR && !sh[0];
      if (nbytes < 3) acc[8*(2-nbytes) +: 8] = sh;
      nbytes++;
      sda_oe = addressed;
    end else if (nbits == 9) begin
      sda_oe = 1'b0; nbits = 0;
    end
  end
endmodule
