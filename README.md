# Elliptic-curve cryptography core and secure Ethernet link

This is a parameterised hardware core for elliptic-curve cryptography over the
binary fields GF(2^M). It uses the five SEC 2 Koblitz curves, sect163k1
through sect571k1, and is wrapped in a small secure-link system that encrypts
selected TCP connections passing between two Ethernet ports.

The core is built bottom-up:

- **Field arithmetic**: squaring, multiplication and division in GF(2^M).
- **Point operations**: point addition and negation, and τ-adic (Frobenius)
  scalar multiplication.
- **Protocol units**: key generation (Q = d·G), El Gamal encryption
  (C1 = k·G, C2 = data + k·Q) and decryption (data = C2 − d·C1).

Around the core sit two more units:

- **Frame filter**: selects the frames of one configured TCP connection.
- **Encrypter and decrypter interfaces**: cut a frame's data into 2M-bit
  blocks. A message is sent as two frames: one carrying the shared C1, the
  other carrying one C2 per block.

Everything is synchronous on one clock with an active-high synchronous reset.
Multi-cycle units use a one-cycle `start` pulse and a one-cycle `done` pulse,
and frame ports are byte streams with `valid/ready/last`.

Two parameters select the configuration:

- `M` picks the curve (163, 233, 283, 409 or 571).
- `D` is the number of multiplier bits processed per clock, which trades area
  for speed.

The default is M = 163 and D = 8.

## Hierarchy

```
main_controller                 secure link, port A (host) <-> port B (network)
├─ frame_filter  u_filt_enc     A->B, destination-port rule
├─ frame_filter  u_filt_dec     B->A, source-port rule
├─ encrypter_interface          frame -> {header+C1, header+C2...}
├─ decrypter_interface          {C1 frame, C2 frame} -> frame
└─ ecc_soft_ip                  the ECC core
   ├─ key_generator             point_multiplier with the curve generator G
   ├─ ecc_encrypter             2 x point_multiplier, point_adder, scalar generator
   └─ ecc_decrypter             point_multiplier, point_negate, point_adder
        point_multiplier        2 x gf_squarer (Frobenius), point_adder
        point_adder             gf_divider, gf_multiplier, 2 x gf_squarer
        gf_divider              gf_divider_binary or gf_divider_itoh (chosen at elaboration)
        gf_divider_itoh         gf_squarer, gf_multiplier, addition-chain table
        gf_multiplier, gf_squarer -> gf_reduce
gf_pkg                          curve constants, addition chains, selection rules
```

## Field arithmetic

Elements are polynomials over GF(2) reduced modulo the SEC 2 pentanomial or
trinomial of each field (`gf_pkg::field_poly_low`).

- **gf_reduce / gf_squarer** are combinational.
  - The squarer spreads bit i of the input to bit 2i.
  - The reducer then folds every bit above M−1 back through the low terms of
    F(x), starting from the top bit.
- **gf_multiplier** is digit-serial and interleaved.
  - Each clock it takes D bits of B, least-significant digit first, ANDs them
    with A·x^(jD), and accumulates the result.
  - A result is ready in ⌈M/D⌉ cycles: 21 cycles at M = 163, D = 8.
- **gf_divider_binary** is the binary (extended-Euclid) algorithm.
  - The add and the following halving are merged into one step per cycle.
  - `done` comes after exactly 2M cycles, 326 at M = 163.
- **gf_divider_itoh** is the Itoh–Tsujii inversion using the addition chains of
  the design, B_i = B_j · B_l^(2^s), with 9, 10, 11, 10 and 12 steps for the
  five fields.
  - It does one squaring per cycle.
  - At the end it adds one more squaring, because the chain ends at
    h^(2^(M−1)−1), and one multiplication by g.
- **gf_divider** instantiates one of the two dividers.
  - It picks Itoh–Tsujii when (M−1) + steps·⌈M/D⌉ ≤ 2M.
  - At M = 163 that means D ≥ 10. The default D = 8 uses the binary divider,
    which is why a division takes 326 cycles.

## Point operations

The curve is y² + xy = x³ + ax² + 1, with a = 1 only for sect163k1. The point
at infinity is (0, 0).

- **point_adder** applies the five rules: O + O, P + O, O + P, P + (−P) = O,
  doubling and the general case.
  - It uses one divider for λ, one multiplier for λ·(x1 + x3), and squarers
    for λ².
  - A full addition takes division + multiplication + 3 cycles: 350 cycles at
    the default. The trivial rules take 2 cycles.
  - Doubling a point with x = 0 returns O.
- **point_negate** computes −(x, y) = (x, x + y) combinationally.
- **point_multiplier** reads the M bits of `k` as τ-adic digits k_i ∈ {0, 1}
  and computes Q = Σ k_i·τ^i(P) by Horner's rule from the top digit.
  - Each digit costs one Frobenius cycle, which squares x and y in the two
    extra squarers, and the digit adds P when it is 1.
  - The latency is at most 164 + 352·(number of ones in k) cycles.
  - Converting an integer scalar to τ-adic form is not part of the design.
    These multipliers commute (τ-adic maps are endomorphisms), so key
    agreement and El Gamal still work with the digit string used directly as
    the key.

## Protocol units

- **key_generator** computes Q = d·G with the SEC 2 generator point of the
  selected curve.
- **ecc_encrypter** encrypts a 2M-bit block `{x, y}`.
  - It computes C1 = k·G and S = k·Q on two point multipliers in parallel,
    then C2 = data + S on the point adder.
  - The block does not need to lie on the curve: the decrypter's C2 + (−S)
    with the same affine formulas returns it bit for bit.
  - The scalar k starts at the constant `K_SEED`. After every full encryption
    it becomes x(k·Q). This is the generator the design describes; it is not
    a cryptographically strong random source.
  - With `reuse_k` set at `start`, the unit keeps k, C1 and S and runs only the
    point addition. This is how later blocks of one message are encrypted.
- **ecc_decrypter** computes S = d·C1, negates it and adds it to C2. With
  `reuse_k`, it keeps S from the previous operation.
- **ecc_soft_ip** puts the three units side by side with ports prefixed
  `kg_`, `enc_` and `dec_`.

## Secure Ethernet link

- **frame_filter** stores each frame and reads the header fields by byte
  position. A fixed 20-byte IPv4 header is assumed.
  - A configuration frame sets the connection. Its layout is destination
    `DA:02:03:04:05:06`, source `5A:02:03:04:05:06`, EtherType `0x1234`, then
    the destination MAC, source MAC and TCP port to watch in bytes 14–27. The
    configuration frame is consumed.
  - A frame is selected when it is IPv4/TCP, has the configured MACs, has the
    configured port and carries at least one data byte. The port checked is
    the destination port with `CHECK_DST_PORT = 1` and the source port
    otherwise. Selected frames go to the crypto side.
  - All other frames are forwarded unchanged, and so is everything before the
    first configuration frame.
  - Frames returning from the crypto side are merged into the transmitter one
    whole frame at a time.
- **encrypter_interface** keeps the 54-byte header and up to 1400 data bytes.
  - It cuts the data into blocks of `{size, data, zero padding}`. At M = 163
    that is a 6-bit size and 40 data bytes. Larger curves use a 7- or 8-bit
    size field: `gf_pkg::blk_size_bits` and `blk_bytes`.
  - The first block is fully encrypted and the rest use `reuse_k`.
  - It then sends two frames: header + C1, and header + the C2 of every
    block. Each point is 41 bytes, `{00, x, y}`, most significant byte first.
  - A 1400-byte message becomes a 95-byte and a 1489-byte frame.
  - Data beyond 1400 bytes is dropped.
- **decrypter_interface** takes the first selected frame as C1 and the next
  one as its C2 frame.
  - It decrypts every block (the first in full, the others with `reuse_k`).
  - It appends `size` bytes of each block and sends the header of the C2
    frame followed by the recovered data.
- **main_controller** wires the parts together.
  - On the A → B path, the encrypting filter on port A sends the selected
    frames through the encrypter interface. The two resulting frames leave on
    port B.
  - On the B → A path, the decrypting filter on port B sends the selected
    frames through the decrypter interface. The recovered frame leaves on
    port A.
  - The private key and the peer's public key are inputs. The own public key
    is produced by the key generator on `kg_start`.

## Measured timing (M = 163, D = 8, simulation)

| Operation | Cycles here | Reported in the design |
|---|---|---|
| Field multiplication | 21 | 21 |
| Division (binary) | 326 | 326 |
| Point addition (general or doubling) | 350 | up to 347 |
| Point multiplication, random k (average) | ≈ 27,700 | 29,463 (average) |
| Point multiplication, all digits 1 | 164 + 352·163 = 57,540 | up to 56,561 |
| Full encryption / reuse encryption of a block | ≈ 23k–28k / 351 | – |
| 1400-byte frame in → both encrypted frames out | ≈ 49,600 | – |
| Round trip, encrypt + loop-back + decrypt, 1400 bytes | ≈ 98,000 | – |

Two other configurations are run by `tb_ecc_workloads`. Both select the
Itoh–Tsujii divider.

| Configuration | First-block encryption | First-block decryption | Reported averages (enc / dec) |
|---|---|---|---|
| M = 163, D = 82 | 15,128 cycles | 14,941 cycles | 24,914 / 27,218 |
| M = 233, D = 30 | 26,718 cycles | 36,979 cycles | 60,063 / 55,499 |

These are single runs with one random key and block, not averages. The
difference from the reported averages was not traced further.

The frame figures include moving every byte at one per clock, with the
testbench holding `ready` low a quarter of the time. The point-addition cost
is 3 cycles above the reported figure because of the register stages around
the squarer and multiplier. With few ones in k, the point multiplication is
faster than the reported average.

## Departures and own choices

- The system uses one clock domain. The design runs the MAC side at 25 MHz
  and the controller and core on their own clocks, with dual-clock FIFOs
  between them. Here frame buffers and `valid/ready` streams replace those
  FIFOs, so `frame_fifos` is not built.
- The vendor MAC wrapper, the PHYs and the clock managers are not built. The
  frame ports carry what the MAC would deliver: frames without preamble and
  FCS.
- In the design, each interface contains its own frame filter and a reduced
  core. Here both filters sit in `main_controller` and the two interfaces
  share one `ecc_soft_ip`.
- The following are this implementation's own choices:
  - the configuration-frame layout
  - the block bit order
  - the point byte serialisation
  - C1/C2 frame pairing by arrival order
  - copying the header unchanged (IP length and checksums are not updated)
- Curve polynomials, coefficients and generator points are the SEC 2 values.
- `K_SEED` is an arbitrary constant.

## Simulation

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. `tb_ecc_ref_pkg` is an independent
behavioural model: a bit-serial multiplier, Fermat inversion and τ-adic
multiplication. The end-to-end test is `tb_main_controller`. It runs key
generation, configuration, forwarding and the 100-, 1400- and 1430-byte
messages through encryption and loop-back decryption, and it counts every
mechanism it expects to see.

Run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb --top-module tb_main_controller \
    rtl/gf_pkg.sv tb/tb_ecc_ref_pkg.sv tb/tb_main_controller.sv \
    $(ls rtl/*.sv | grep -v gf_pkg) -Mdir obj -o sim && obj/sim
```

Replace `tb_main_controller` with any other `tb_*` name to run that
testbench. `tb_ecc_workloads` also needs `tb/ecc_workload_run.sv` on the
command line. The full link test takes about 12 s and the point-adder test about
16 s.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `M` | all | 163 | Field degree / curve: 163, 233, 283, 409, 571 |
| `D` | multiplier and up | 8 | Multiplier bits per clock, 1 … ⌈M/2⌉; also selects the divider |
| `K_SEED` | ecc_encrypter | constant | First encryption scalar |
| `MAX_DATA` | interfaces, main_controller | 1400 | Data bytes carried per frame |
| `MAX_FRAME` | frame_filter | 1514 | Frame buffer size; longer frames are cut |
| `CHECK_DST_PORT` | frame_filter | 1 | 1: match TCP destination port, 0: source port |

The frame level is simulated only at M = 163 and D = 8. The core is
simulated end to end at three settings: M = 163 with D = 8, M = 163 with
D = 82, and M = 233 with D = 30. The constants for M = 283, 409 and 571 are
in `gf_pkg`. The squarer is also tested at M = 571, but no point operation
has been simulated on those three curves.
